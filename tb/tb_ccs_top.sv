// tb_ccs_top: end-to-end test of the Cache Compute System at its default size
// (64-byte lines, 32-bit elements, 16 lanes).
//
// The testbench plays the host processor, the host's memory system, the upper
// cache levels and the page-table side of the TLB; the last-level cache is the
// behavioural model tb_ccs_llc_model. The host programs commands through the
// memory-mapped registers exactly as the software library would (setup
// registers, START, and for a batch of commands no waiting in between, as in a
// convolution loop), then polls READINESS and compares every result in the
// cache with the reference model. On each TLB miss the host fills an entry
// (round robin) with the page map used to lay out the data. Meanwhile the upper
// cache levels issue random line reads to the LLC and the host makes ordinary
// memory reads, so the shared ports are contended.
//
// Every mechanism of the design is counted and must occur at least once:
// level-0 and level-1 map results, single-line reduction at the tree output,
// multi-line reduction through the accumulator, two-operand buffering,
// realignment of operands that straddle two lines, reuse of the shared line
// by the next run (stride 1), TLB miss
// stall, LLC miss wait, write-back stall, LLC port contention, ordering hold of
// a shallower command behind a deeper one, START held off while the queue is
// full, router hold, overflow flag, TLB flush.
module tb_ccs_top;
  import ccs_pkg::*;
  import tb_ccs_ref_pkg::*;

  localparam int LINE_BYTES = 64, N = 16, VA_W = 48, PA_W = 40;
  localparam longint PI_BASE = 64'h2000_0000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                    cpu_req_valid = 0, cpu_req_ready, cpu_req_we = 0, cpu_rsp_valid;
  logic [VA_W-1:0]         cpu_req_addr = '0;
  logic [63:0]             cpu_req_wdata = '0, cpu_rsp_rdata;
  logic                    mem_req_valid, mem_req_ready, mem_req_we, mem_rsp_valid;
  logic [VA_W-1:0]         mem_req_addr;
  logic [63:0]             mem_req_wdata, mem_rsp_rdata;
  logic                    tlb_flush = 0, tlb_fill_valid = 0, tlb_miss;
  logic [3:0]              tlb_fill_idx = '0;
  logic [VA_W-13:0]        tlb_fill_vpn = '0;
  logic [PA_W-13:0]        tlb_fill_ppn = '0;
  logic [VA_W-1:0]         tlb_miss_va;
  logic                    l1_req_valid = 0, l1_req_ready, l1_req_we, l1_rsp_valid, l1_rsp_ready;
  logic [PA_W-1:0]         l1_req_addr = '0;
  logic [LINE_BYTES*8-1:0] l1_req_wdata, l1_rsp_rdata;
  logic [LINE_BYTES-1:0]   l1_req_be;
  logic                    llc_req_valid, llc_req_ready, llc_req_we, llc_rsp_valid, llc_rsp_ready;
  logic [PA_W-1:0]         llc_req_addr;
  logic [LINE_BYTES*8-1:0] llc_req_wdata, llc_rsp_rdata;
  logic [LINE_BYTES-1:0]   llc_req_be;
  logic                    ccs_ready;

  ccs_top dut (.*);

  tb_ccs_llc_model #(.LINE_BYTES(LINE_BYTES), .PA_W(PA_W), .HIT_LAT(2), .MISS_LAT(12), .BP(1)) llc (
    .clk, .req_valid(llc_req_valid && rst_n), .req_ready(llc_req_ready), .req_we(llc_req_we),
    .req_addr(llc_req_addr), .req_wdata(llc_req_wdata), .req_be(llc_req_be),
    .rsp_valid(llc_rsp_valid), .rsp_ready(llc_rsp_ready), .rsp_rdata(llc_rsp_rdata));

  assign l1_req_we    = 1'b0;
  assign l1_req_wdata = '0;
  assign l1_req_be    = '0;
  assign l1_rsp_ready = 1'b1;

  // ------------------------------------------------------ host memory side
  assign mem_req_ready = 1'b1;
  always @(posedge clk) begin
    mem_rsp_valid <= mem_req_valid && !mem_req_we;
    mem_rsp_rdata <= 64'(mem_req_addr) ^ 64'h5a5a;
  end

  // -------------------------------------------------------------- counters
  int checks = 0, failures = 0;
  int n_out1, n_out2, n_outm, n_acc, n_buf, n_tlbstall, n_llcmiss, n_wbstall, n_contend,
      n_order, n_starthold, n_routerhold, n_ovf, n_flush, n_fill, l1_sent, l1_got, n_split, n_reuse;
  initial begin
    n_out1 = 0; n_out2 = 0; n_outm = 0; n_acc = 0; n_buf = 0; n_tlbstall = 0; n_llcmiss = 0;
    n_wbstall = 0; n_contend = 0; n_order = 0; n_starthold = 0; n_routerhold = 0; n_ovf = 0;
    n_flush = 0; n_fill = 0; l1_sent = 0; l1_got = 0; n_split = 0; n_reuse = 0;
  end
  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctl.u_dp.sel1 && dut.u_ctl.adv) n_out1++;
    if (dut.u_ctl.u_dp.sel2 && dut.u_ctl.adv) n_out2++;
    if (dut.u_ctl.u_dp.selm && dut.u_ctl.adv) n_outm++;
    if (dut.u_ctl.u_dp.accv && dut.u_ctl.adv) n_acc++;
    if (dut.u_ctl.buf_load) n_buf++;
    if (dut.u_ctl.q_push && dut.u_ctl.q_in.low) n_split++;
    if (dut.u_ctl.q_push && dut.u_ctl.q_in.two && !dut.u_ctl.hi) n_reuse++;
    if (tlb_miss) n_tlbstall++;
    if (dut.u_ctl.req_valid && dut.u_ctl.req_we && !dut.u_ctl.req_ready) n_wbstall++;
    if (l1_req_valid && dut.u_ctl.req_valid) n_contend++;
    if (dut.u_ctl.cmd_valid && !dut.u_ctl.act && !dut.u_ctl.can_start) n_order++;
    if (dut.u_pi.start_wr && !dut.u_pi.req_ready) n_starthold++;
    if (cpu_req_valid && dut.u_router.blocked) n_routerhold++;
    if (dut.ovf_pulse) n_ovf++;
    if (l1_req_valid && l1_req_ready) l1_sent++;
    if (l1_rsp_valid) l1_got++;
  end

  // ------------------------------------------------------ TLB refill agent
  function automatic longint v2p(longint va);
    return (((va >> 12) + 64'h100) << 12) | (va & 64'hfff);
  endfunction
  always @(posedge clk) begin
    tlb_fill_valid <= 1'b0;
    if (rst_n && tlb_miss && !tlb_fill_valid) begin
      tlb_fill_valid <= 1'b1;
      tlb_fill_vpn   <= tlb_miss_va[VA_W-1:12];
      tlb_fill_ppn   <= PA_W'(v2p(longint'(tlb_miss_va)) >> 12);
      tlb_fill_idx   <= tlb_fill_idx + 1'b1;
      n_fill++;
    end
  end

  // --------------------------------------------- upper cache level traffic
  bit l1_on = 1;
  always @(posedge clk) begin
    if (!rst_n) l1_req_valid <= 1'b0;
    else if (!l1_req_valid || l1_req_ready) begin
      l1_req_valid <= l1_on && ($urandom_range(0, 5) == 0);
      l1_req_addr  <= PA_W'(64'h80_0000_0000 + longint'($urandom_range(0, 255)) * 64);
    end
  end

  // ------------------------------------------------------------ host bus
  task automatic bus_write(longint addr, longint data);
    @(negedge clk);
    cpu_req_valid = 1; cpu_req_we = 1; cpu_req_addr = VA_W'(addr); cpu_req_wdata = data;
    @(posedge clk);
    while (!cpu_req_ready) @(posedge clk);
    #1 cpu_req_valid = 0;
  endtask
  task automatic bus_read(longint addr, output longint data);
    @(negedge clk);
    cpu_req_valid = 1; cpu_req_we = 0; cpu_req_addr = VA_W'(addr);
    @(posedge clk);
    while (!cpu_req_ready) @(posedge clk);
    #1 cpu_req_valid = 0;
    while (!cpu_rsp_valid) @(posedge clk) #1;
    data = cpu_rsp_rdata;
  endtask
  task automatic pi_wr(logic [7:0] off, longint v); bus_write(PI_BASE + off, v); endtask
  task automatic ccs_setup(ccs_cmd_e c, int len, longint k, longint a, longint b, longint r, int s);
    pi_wr(PI_CMD_ID, c); pi_wr(PI_OP_LEN, len); pi_wr(PI_K, k);
    pi_wr(PI_OPA_ADDR, a); pi_wr(PI_OPB_ADDR, b); pi_wr(PI_RES_ADDR, r); pi_wr(PI_STRIDE, s);
  endtask
  task automatic ccs_wait();
    longint r = 0;
    while (r != 1) bus_read(PI_BASE + PI_READINESS, r);
  endtask

  // --------------------------------------------------------- data helpers
  function automatic bit [31:0] rd_elem(longint va);
    bit [511:0] l = llc.peek(v2p(va) >> 6);
    return l[((va >> 2) & 15) * 32 +: 32];
  endfunction
  function automatic void wr_elem(longint va, bit [31:0] v);
    bit [511:0] l = llc.peek(v2p(va) >> 6);
    l[((va >> 2) & 15) * 32 +: 32] = v;
    llc.mem[v2p(va) >> 6] = l;
  endfunction
  function automatic longint eaddr(longint base, int i, int s);
    return base + longint'(i / N) * s * LINE_BYTES + longint'(i % N) * 4;
  endfunction

  typedef struct {
    ccs_cmd_e c; int len; bit [31:0] k; longint a, b, r; int s; bit [31:0] ev[];
  } job_t;
  job_t jobs[$];

  function automatic job_t make_job(ccs_cmd_e c, int len, bit [31:0] k, int s, longint base, bit mis = 0);
    job_t j;
    bit [31:0] va[], vb[];
    j.c = c; j.len = len; j.k = k; j.s = s;
    j.a = base; j.b = base + 64'h3000; j.r = base + 64'h6000;
    if (mis) begin
      j.a += 4 * $urandom_range(0, N - 1);
      j.b += 4 * $urandom_range(0, N - 1);
      if (is_reduce(c)) j.r += 4 * $urandom_range(0, N - 1);
    end
    va = new[len]; vb = new[len];
    foreach (va[i]) begin
      va[i] = $urandom_range(0, 2000) - 1000;
      vb[i] = $urandom_range(0, 2000) - 1000;
      wr_elem(eaddr(j.a, i, s), va[i]);
      wr_elem(eaddr(j.b, i, s), vb[i]);
    end
    if (is_reduce(c)) begin
      j.ev = new[1];
      j.ev[0] = ref_reduce(c, va, two_vec(c) ? vb : va);
    end else begin
      j.ev = new[len];
      foreach (va[i]) j.ev[i] = ref_map(c, va[i], vb[i], k);
    end
    return j;
  endfunction

  task automatic check_job(job_t j, int q);
    if (is_reduce(j.c)) begin
      checks++;
      if (rd_elem(j.r) != j.ev[0]) begin
        failures++; $display("FAIL job %0d %s len %0d got %h exp %h", q, j.c.name(), j.len, rd_elem(j.r), j.ev[0]);
      end
    end else
      foreach (j.ev[i]) begin
        checks++;
        if (rd_elem(eaddr(j.r, i, j.s)) != j.ev[i]) begin
          failures++; $display("FAIL job %0d %s elem %0d got %h exp %h", q, j.c.name(), i,
                               rd_elem(eaddr(j.r, i, j.s)), j.ev[i]);
        end
      end
  endtask

  task automatic expect_seen(string what, int n);
    checks++;
    $display("  %-28s %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
  endtask

  initial begin
    longint base = 64'h40_0000, r;
    int len;
    job_t j;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // ---- readiness after reset and an ordinary memory read through the router
    bus_read(PI_BASE + PI_READINESS, r);
    checks++; if (r != 1) begin failures++; $display("FAIL not ready after reset"); end
    bus_read(64'h1234_5678, r);
    checks++; if (r != (64'h1234_5678 ^ 64'h5a5a)) begin failures++; $display("FAIL memory read %h", r); end
    bus_read(PI_BASE + PI_STRIDE, r);
    checks++; if (r != 1) begin failures++; $display("FAIL STRIDE reset value %0d", r); end

    // ---- batch 1: one command per class, started back to back without waiting
    for (int c = 0; c < 47; c++) begin
      len = (c % 3 == 0) ? N : (c % 3 == 1) ? $urandom_range(1, N - 1) : $urandom_range(N + 1, 4 * N);
      j = make_job(ccs_cmd_e'(c), len, $urandom_range(0, 40) - 5, (c % 5 == 4) ? 2 : 1, base);
      base += 64'h1_0000;
      jobs.push_back(j);
      ccs_setup(j.c, j.len, j.k, j.a, j.b, j.r, j.s);
      pi_wr(PI_START, 1);
      if (c == 20) begin
        // an ordinary memory access in the middle of the batch
        bus_read(64'h0000_1000, r);
        checks++; if (r != (64'h1000 ^ 64'h5a5a)) begin failures++; $display("FAIL memory read 2"); end
      end
    end
    ccs_wait();
    foreach (jobs[q]) check_job(jobs[q], q);

    // ---- batch 2: every command again, operands at random element addresses
    jobs.delete();
    for (int c = 0; c < 47; c++) begin
      len = $urandom_range(1, 3 * N);
      j = make_job(ccs_cmd_e'(c), len, $urandom_range(0, 40) - 5, 1, base, 1);
      base += 64'h1_0000;
      jobs.push_back(j);
      ccs_setup(j.c, j.len, j.k, j.a, j.b, j.r, j.s);
      pi_wr(PI_START, 1);
    end
    ccs_wait();
    foreach (jobs[q]) check_job(jobs[q], 200 + q);

    // ---- overflow: MULVC with a large constant, then clear the flag
    bus_read(PI_BASE + PI_STATUS, r);
    if (r[0]) pi_wr(PI_STATUS, 1);
    j = make_job(MULVC, N, 32'h4000_0000, 1, base); base += 64'h1_0000;
    ccs_setup(j.c, j.len, j.k, j.a, j.b, j.r, j.s); pi_wr(PI_START, 1);
    ccs_wait();
    check_job(j, 100);
    bus_read(PI_BASE + PI_STATUS, r);
    checks++; if (!r[0]) begin failures++; $display("FAIL overflow flag not set"); end
    pi_wr(PI_STATUS, 1);
    bus_read(PI_BASE + PI_STATUS, r);
    checks++; if (r[0]) begin failures++; $display("FAIL overflow flag not cleared"); end

    // ---- TLB flush, then a convolution-like loop: one IPVV per output point
    @(negedge clk); tlb_flush = 1; @(negedge clk); tlb_flush = 0; n_flush++;
    begin
      // 1-D convolution of a 64-sample signal with a 15-tap kernel
      longint sig = base, ker = base + 64'h1000, res = base + 64'h2000, win = base + 64'h3000;
      bit [31:0] x[64], h[15], wv[], hv[];
      base += 64'h1_0000;
      foreach (x[i]) begin x[i] = $urandom_range(0, 200) - 100; end
      foreach (h[i]) begin h[i] = $urandom_range(0, 20) - 10; wr_elem(ker + i * 4, h[i]); end
      for (int o = 0; o + 15 <= 64; o++) begin
        // the host gathers the window into a buffer, one line per point
        for (int t = 0; t < 15; t++) wr_elem(win + o * 64 + t * 4, x[o + t]);
        ccs_setup(IPVV, 15, 0, win + o * 64, ker, res + o * 4 * 16, 1);
        pi_wr(PI_START, 1);
      end
      ccs_wait();
      hv = new[15]; wv = new[15];
      foreach (h[i]) hv[i] = h[i];
      for (int o = 0; o + 15 <= 64; o++) begin
        foreach (wv[t]) wv[t] = x[o + t];
        checks++;
        if (rd_elem(res + o * 64) != ref_reduce(IPVV, wv, hv)) begin
          failures++; $display("FAIL conv point %0d", o);
        end
      end
    end

    l1_on = 0;
    repeat (40) @(posedge clk);
    n_llcmiss = llc.misses;
    checks++;
    if (l1_sent != l1_got) begin failures++; $display("FAIL upper-level reads %0d answered %0d", l1_sent, l1_got); end
    $display("mechanisms:");
    expect_seen("level-0 map result (OUT1)", n_out1);
    expect_seen("level-1 map result (OUT2)", n_out2);
    expect_seen("tree reduction (OUT_M)", n_outm);
    expect_seen("accumulated reduction", n_acc);
    expect_seen("first operand buffered", n_buf);
    expect_seen("split operand line reads", n_split);
    expect_seen("operand lines reused by the next run", n_reuse);
    expect_seen("TLB miss stall cycles", n_tlbstall);
    expect_seen("TLB refills", n_fill);
    expect_seen("TLB flushes", n_flush);
    expect_seen("LLC misses", n_llcmiss);
    expect_seen("write-back stall cycles", n_wbstall);
    expect_seen("LLC port contention cycles", n_contend);
    expect_seen("ordering hold cycles", n_order);
    expect_seen("START held off cycles", n_starthold);
    expect_seen("router hold cycles", n_routerhold);
    expect_seen("overflow pulses", n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
