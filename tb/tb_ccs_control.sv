// tb_ccs_control: command execution by the CCS control unit against a
// behavioural last-level cache.
//
// The TLB is modelled in the testbench as a page map (virtual page p -> physical
// page p + 0x100) with one page left unmapped until the test fills it, so a TLB
// miss stall happens. Commands of every class are queued back to back (the next
// one offered as soon as the unit accepts the previous): map and reduce, single
// line and split over several lines, with strides of 1 and 2 lines; half of
// them with operands (and reduce results) at random element offsets inside a
// line, so operand runs straddle two lines and are realigned (with stride 1
// the shared line is reused by the next run). After all
// complete, the cache contents at every result address are compared with the
// reference model; untouched bytes of partially written lines must keep their
// old value. The cache answers hits in 2 cycles and misses in 12, and randomly
// drops its ready. Also checked: a one-line ADDVV on cached operands completes
// within a fixed cycle bound.
module tb_ccs_control;
  import ccs_pkg::*;
  import tb_ccs_ref_pkg::*;

  localparam int LINE_BYTES = 64, DW = 32, N = 16, VA_W = 48, PA_W = 40;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                    cmd_valid = 0, cmd_accept;
  logic [5:0]              cmd_id;
  logic [31:0]             cmd_len, cmd_stride;
  logic [DW-1:0]           cmd_k;
  logic [VA_W-1:0]         cmd_opa, cmd_opb, cmd_res;
  logic [1:0][VA_W-1:0]    xl_va;
  logic [1:0][PA_W-1:0]    xl_pa;
  logic [1:0]              xl_hit;
  logic                    tlb_miss;
  logic [VA_W-1:0]         tlb_miss_va;
  logic                    req_valid, req_ready, req_we, rsp_valid, rsp_ready, idle, ovf;
  logic [PA_W-1:0]         req_addr;
  logic [LINE_BYTES*8-1:0] req_wdata, rsp_rdata;
  logic [LINE_BYTES-1:0]   req_be;

  ccs_control #(.LINE_BYTES(LINE_BYTES), .DW(DW), .VA_W(VA_W), .PA_W(PA_W)) dut (.*);

  tb_ccs_llc_model #(.LINE_BYTES(LINE_BYTES), .PA_W(PA_W), .HIT_LAT(2), .MISS_LAT(12), .BP(1)) llc (
    .clk, .req_valid(req_valid && rst_n), .req_ready, .req_we, .req_addr, .req_wdata, .req_be,
    .rsp_valid, .rsp_ready, .rsp_rdata);

  // testbench TLB: page p maps to page p + 0x100, except HOLE until filled
  localparam longint HOLE = 64'h45;
  bit hole_filled = 0;
  always_comb begin
    longint vpn;
    for (int p = 0; p < 2; p++) begin
      vpn = longint'(xl_va[p] >> 12);
      xl_hit[p] = (vpn != HOLE) || hole_filled;
      xl_pa[p]  = PA_W'(((vpn + 64'h100) << 12) | longint'(xl_va[p][11:0]));
    end
  end
  function automatic longint v2p(longint va);
    return (((va >> 12) + 64'h100) << 12) | (va & 64'hfff);
  endfunction

  int checks = 0, failures = 0, tlb_stalls = 0, wb_stalls = 0, split_reads = 0, reused = 0;
  always @(posedge clk) begin
    if (tlb_miss) tlb_stalls++;
    if (dut.q_push && dut.q_in.low) split_reads++;
    if (dut.q_push && dut.q_in.two && !dut.hi) reused++;
    if (req_valid && req_we && !req_ready) wb_stalls++;
  end

  // ---------------------------------------------------------- element access
  function automatic bit [31:0] rd_elem(longint va);
    bit [511:0] l = llc.peek(v2p(va) >> 6);
    return l[((va >> 2) & 15) * 32 +: 32];
  endfunction
  function automatic void wr_elem(longint va, bit [31:0] v);
    bit [511:0] l = llc.peek(v2p(va) >> 6);
    l[((va >> 2) & 15) * 32 +: 32] = v;
    llc.mem[v2p(va) >> 6] = l;
  endfunction
  // address of element i of a vector with line stride s
  function automatic longint eaddr(longint base, int i, int s);
    return base + longint'(i / N) * s * LINE_BYTES + longint'(i % N) * 4;
  endfunction

  typedef struct {
    ccs_cmd_e c; int len; bit [31:0] k; longint a, b, r; int s;
    bit [31:0] exp_vals[]; bit [31:0] guard;
  } job_t;
  job_t jobs[$];

  task automatic offer(job_t j);
    cmd_id = 6'(j.c); cmd_len = j.len; cmd_k = j.k; cmd_opa = j.a; cmd_opb = j.b;
    cmd_res = j.r; cmd_stride = j.s; cmd_valid = 1;
    @(posedge clk);
    while (!cmd_accept) @(posedge clk);
    #1 cmd_valid = 0;
  endtask

  initial begin
    job_t j;
    longint base = 64'h10_0000;
    bit [31:0] va[], vb[];
    ccs_cmd_e list[] = '{ADDVV, IPVV, MULVC, ADDV, RELUV, SSDVV, MAXV, ROLVV, SADVV,
                         MINV, SQV, XORV, SUBVC, ANDV, NOTV, ORV, COMP2V, ABSV, SRAVC, EQUVC};
    longint t0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // ---- latency of a single cached ADDVV line
    for (int i = 0; i < N; i++) begin wr_elem(64'h8000 + i*4, i); wr_elem(64'h9000 + i*4, 3*i); end
    void'(llc.peek(0));
    llc.present[v2p(64'h8000) >> 6] = 1; llc.present[v2p(64'h9000) >> 6] = 1;
    llc.present[v2p(64'hA000) >> 6] = 1;
    llc.bp_en = 0;
    @(posedge clk);
    t0 = llc.cyc;
    j.c = ADDVV; j.len = N; j.k = 0; j.a = 64'h8000; j.b = 64'h9000; j.r = 64'hA000; j.s = 1;
    offer(j);
    while (!idle || cmd_valid) @(posedge clk);
    checks++;
    // accept 1 + two reads 2 + hit answered on the third edge 3 + operand
    // register and level 0: 2 + write 1 + idle flag 1 + sampling 1 = 11 cycles
    if (llc.cyc - t0 > 11) begin failures++; $display("FAIL ADDVV line took %0d cycles", llc.cyc - t0); end
    $display("one-line ADDVV on cached operands: %0d cycles", llc.cyc - t0);
    llc.bp_en = 1;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (rd_elem(64'hA000 + i*4) != 4*i) begin failures++; $display("FAIL short ADDVV lane %0d got %h a %h b %h", i, rd_elem(64'hA000 + i*4), rd_elem(64'h8000 + i*4), rd_elem(64'h9000 + i*4)); end
    end
    // ---- queued mix
    for (int n = 0; n < 60; n++) begin
      j.c   = (n < list.size()) ? list[n] : ccs_cmd_e'($urandom_range(0, 46));
      j.len = (n % 3 == 0) ? $urandom_range(1, N) : $urandom_range(N + 1, 5 * N);
      j.s   = (n % 4 == 3) ? 2 : 1;
      j.k   = $urandom_range(0, 40) - 8;
      j.a   = base; j.b = base + 64'h2000; j.r = base + 64'h4000;
      if (n % 2 == 1) begin
        // operands at any element address; a reduce result at any element
        j.a += 4 * $urandom_range(0, N - 1);
        j.b += 4 * $urandom_range(0, N - 1);
        if (is_reduce(j.c)) j.r += 4 * $urandom_range(0, N - 1);
      end
      if (n == 7) j.b = (HOLE << 12);               // second operand in the unmapped page
      base += 64'h8000;
      va = new[j.len]; vb = new[j.len];
      foreach (va[i]) begin
        va[i] = rd_elem(eaddr(j.a, i, j.s)) % 1000 - 300;  // keep products in range
        vb[i] = rd_elem(eaddr(j.b, i, j.s)) % 1000 - 300;
        wr_elem(eaddr(j.a, i, j.s), va[i]);
        wr_elem(eaddr(j.b, i, j.s), vb[i]);
      end
      if (is_reduce(j.c)) begin
        j.exp_vals = new[1];
        j.exp_vals[0] = ref_reduce(j.c, va, two_vec(j.c) ? vb : va);
        j.guard = rd_elem(j.r + 4);
      end else begin
        j.exp_vals = new[j.len];
        foreach (va[i]) j.exp_vals[i] = ref_map(j.c, va[i], vb[i], j.k);
        j.guard = rd_elem(eaddr(j.r, j.len, j.s));
      end
      jobs.push_back(j);
    end
    fork
      begin
        foreach (jobs[q]) offer(jobs[q]);
      end
      begin
        // fill the missing TLB page after the unit has stalled on it a while
        wait (tlb_miss);
        repeat (20) @(posedge clk);
        hole_filled = 1;
      end
    join
    @(posedge clk);
    while (!idle) @(posedge clk);
    foreach (jobs[q]) begin
      j = jobs[q];
      if (is_reduce(j.c)) begin
        checks += 2;
        if (rd_elem(j.r) != j.exp_vals[0]) begin
          failures++; $display("FAIL job %0d %s len %0d got %h exp %h", q, j.c.name(), j.len, rd_elem(j.r), j.exp_vals[0]);
        end
        if (rd_elem(j.r + 4) != j.guard) begin failures++; $display("FAIL job %0d guard", q); end
      end else begin
        foreach (j.exp_vals[i]) begin
          checks++;
          if (rd_elem(eaddr(j.r, i, j.s)) != j.exp_vals[i]) begin
            failures++; $display("FAIL job %0d %s elem %0d got %h exp %h", q, j.c.name(), i,
                                 rd_elem(eaddr(j.r, i, j.s)), j.exp_vals[i]);
          end
        end
        checks++;
        if ((j.len % N) != 0 && rd_elem(eaddr(j.r, j.len, j.s)) != j.guard) begin
          failures++; $display("FAIL job %0d tail guard", q);
        end
      end
    end
    checks++;
    if (split_reads == 0) begin failures++; $display("FAIL no split operand read seen"); end
    if (reused == 0) begin failures++; $display("FAIL no operand line reused"); end
    checks++;
    if (tlb_stalls == 0) begin failures++; $display("FAIL no TLB miss stall seen"); end
    $display("split operand reads %0d, reused lines %0d", split_reads, reused);
    $display("tlb stall cycles %0d, write stall cycles %0d, llc reads %0d misses %0d writes %0d",
             tlb_stalls, wb_stalls, llc.reads, llc.misses, llc.writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
