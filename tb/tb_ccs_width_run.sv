// tb_ccs_width_run: one self-checking run of the CCS control unit and its
// processing tree, built for element width DW, against the behavioural LLC
// (helper of tb_ccs_widths, which runs it for 16-bit and 8-bit elements).
//
// The TLB is an identity map. A list of commands covering every FU type is
// queued back to back, with random lengths of up to three lines and operands
// and reduce results at random element addresses. Afterwards every result in
// the cache is compared with a reference written here for DW-bit two's
// complement arithmetic. done rises when the run has finished; checks and
// failures are its counts.
module tb_ccs_width_run
  import ccs_pkg::*;
#(
  parameter int DW = 16
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int LINE_BYTES = 64, VA_W = 48, PA_W = 40, N = LINE_BYTES * 8 / DW, EBY = DW / 8;
  typedef logic [DW-1:0] el_t;
  typedef logic signed [DW-1:0] sel_t;

  logic            cmd_valid = 0, cmd_accept;
  logic [5:0]      cmd_id = '0;
  logic [31:0]     cmd_len = '0, cmd_stride = 32'd1;
  logic [DW-1:0]   cmd_k = '0;
  logic [VA_W-1:0] cmd_opa = '0, cmd_opb = '0, cmd_res = '0;
  logic [1:0][VA_W-1:0] xl_va;
  logic [1:0][PA_W-1:0] xl_pa;
  logic [1:0]      xl_hit;
  logic            tlb_miss;
  logic [VA_W-1:0] tlb_miss_va;
  logic            req_valid, req_ready, req_we, rsp_valid, rsp_ready, idle, ovf;
  logic [PA_W-1:0] req_addr;
  logic [LINE_BYTES*8-1:0] req_wdata, rsp_rdata;
  logic [LINE_BYTES-1:0]   req_be;

  assign xl_pa[0] = PA_W'(xl_va[0]);
  assign xl_pa[1] = PA_W'(xl_va[1]);
  assign xl_hit   = 2'b11;

  ccs_control #(.LINE_BYTES(LINE_BYTES), .DW(DW), .VA_W(VA_W), .PA_W(PA_W)) dut (.*);

  tb_ccs_llc_model #(.LINE_BYTES(LINE_BYTES), .PA_W(PA_W), .HIT_LAT(2), .MISS_LAT(8), .BP(1)) llc (
    .clk, .req_valid(req_valid && rst_n), .req_ready, .req_we, .req_addr, .req_wdata, .req_be,
    .rsp_valid, .rsp_ready, .rsp_rdata);

  function automatic el_t rd(longint a);
    logic [LINE_BYTES*8-1:0] l;
    l = llc.peek(a >> 6);
    return l[((a % LINE_BYTES) / EBY) * DW +: DW];
  endfunction
  function automatic void wr(longint a, el_t v);
    logic [LINE_BYTES*8-1:0] l;
    l = llc.peek(a >> 6);
    l[((a % LINE_BYTES) / EBY) * DW +: DW] = v;
    llc.poke(a >> 6, l);
  endfunction

  localparam int SH = $clog2(DW);
  function automatic el_t map_ref(ccs_cmd_e c, el_t a, el_t b, el_t k);
    int s;
    case (c)
      ADDVV:  return a + b;
      SUBVC:  return a - k;
      MULVV:  return el_t'(sel_t'(a) * sel_t'(b));
      LESSVC: return el_t'(sel_t'(a) < sel_t'(k));
      SQV:    return el_t'(sel_t'(a) * sel_t'(a));
      ABSV:   return (sel_t'(a) < 0) ? el_t'(-sel_t'(a)) : a;
      RELUV:  return (sel_t'(a) > 0) ? a : '0;
      SRAVV:  begin s = int'(b[SH-1:0]); return el_t'(sel_t'(a) >>> s); end
      ROLVC:  begin s = int'(k[SH-1:0]); return (s == 0) ? a : el_t'((a << s) | (a >> (DW - s))); end
      XORVV:  return a ^ b;
      NOTV:   return ~a;
      default: return 'x;
    endcase
  endfunction
  function automatic el_t red_ref(ccs_cmd_e c, el_t a[], el_t b[]);
    el_t acc, d;
    case (c)
      MAXV: acc = {1'b1, {(DW-1){1'b0}}};
      MINV: acc = {1'b0, {(DW-1){1'b1}}};
      ANDV: acc = '1;
      default: acc = '0;
    endcase
    foreach (a[i]) begin
      d = a[i] - b[i];
      case (c)
        SSDVV: acc += el_t'(sel_t'(d) * sel_t'(d));
        SADVV: acc += (sel_t'(d) < 0) ? el_t'(-sel_t'(d)) : d;
        IPVV:  acc += el_t'(sel_t'(a[i]) * sel_t'(b[i]));
        ADDV:  acc += a[i];
        MAXV:  if (sel_t'(a[i]) > sel_t'(acc)) acc = a[i];
        MINV:  if (sel_t'(a[i]) < sel_t'(acc)) acc = a[i];
        ANDV:  acc &= a[i];
        default: ;
      endcase
    end
    return acc;
  endfunction

  typedef struct { ccs_cmd_e c; int len; el_t k; longint a, b, r; el_t ev[]; } job_t;
  job_t jobs[$];
  ccs_cmd_e list[] = '{ADDVV, SUBVC, MULVV, LESSVC, SQV, ABSV, RELUV, SRAVV, ROLVC, XORVV, NOTV,
                       SSDVV, SADVV, IPVV, ADDV, MAXV, MINV, ANDV};

  initial begin
    job_t j;
    el_t va[], vb[];
    longint base;
    bit red;
    done = 0; checks = 0; failures = 0;
    base = 64'h10_0000;
    for (int n = 0; n < 3 * list.size(); n++) begin
      j.c   = list[n % list.size()];
      j.len = $urandom_range(1, 3 * N);
      j.k   = el_t'($urandom_range(0, 12)) - el_t'(3);
      red   = (j.c inside {SSDVV, SADVV, IPVV, ADDV, MAXV, MINV, ANDV});
      j.a   = base + EBY * $urandom_range(0, N - 1);
      j.b   = base + 64'h1000 + EBY * $urandom_range(0, N - 1);
      j.r   = base + 64'h2000 + (red ? EBY * $urandom_range(0, N - 1) : 0);
      base += 64'h4000;
      va = new[j.len]; vb = new[j.len];
      foreach (va[i]) begin
        va[i] = el_t'($urandom); vb[i] = el_t'($urandom);
        if (j.c inside {MULVV, SQV, SSDVV, IPVV}) begin va[i] = va[i] >>> (DW / 2 + 1); vb[i] = vb[i] >>> (DW / 2 + 1); end
        wr(j.a + i * EBY, va[i]); wr(j.b + i * EBY, vb[i]);
      end
      if (red) begin
        j.ev = new[1];
        j.ev[0] = red_ref(j.c, va, (j.c inside {SSDVV, SADVV, IPVV}) ? vb : va);
      end else begin
        j.ev = new[j.len];
        foreach (va[i]) j.ev[i] = map_ref(j.c, va[i], vb[i], j.k);
      end
      jobs.push_back(j);
    end
    wait (rst_n);
    foreach (jobs[q]) begin
      @(negedge clk);
      cmd_valid = 1; cmd_id = 6'(jobs[q].c); cmd_len = jobs[q].len; cmd_k = jobs[q].k;
      cmd_opa = VA_W'(jobs[q].a); cmd_opb = VA_W'(jobs[q].b); cmd_res = VA_W'(jobs[q].r);
      @(posedge clk);
      while (!cmd_accept) @(posedge clk);
      #1 cmd_valid = 0;
    end
    @(posedge clk);
    while (!idle) @(posedge clk);
    foreach (jobs[q]) begin
      j = jobs[q];
      foreach (j.ev[i]) begin
        checks++;
        if (rd(j.r + i * EBY) !== j.ev[i]) begin
          failures++;
          $display("FAIL DW=%0d job %0d %s len %0d elem %0d got %h exp %h", DW, q, j.c.name(), j.len, i,
                   rd(j.r + i * EBY), j.ev[i]);
        end
      end
    end
    $display("DW=%0d: %0d commands, %0d checks, %0d failures", DW, jobs.size(), checks, failures);
    done = 1;
  end
endmodule
