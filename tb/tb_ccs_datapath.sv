// tb_ccs_datapath: self-checking test of the CCS processing structure.
//
// Every one of the 47 commands is decoded and pushed through the tree with
// random operands: map commands with a random partial lane mask, reduce
// commands both as a single line (result at the tree output) and split over
// several lines (result at the accumulator). Each result is compared with the
// reference model and its latency with the expected tap: 2 cycles for level-0
// results, 3 for level-1, 3+log2(N) for the tree and 4+log2(N) for the
// accumulator. A final phase streams lines back to back while adv is dropped
// at random, checking throughput and the global stall.
module tb_ccs_datapath;
  import ccs_pkg::*;
  import tb_ccs_ref_pkg::*;

  localparam int LINE_BYTES = 64, DW = 32, N = 16, LG = 4, TAG_W = 40;

  logic                 clk = 0, rst_n = 0, adv = 1, in_valid = 0;
  ccs_dec_t             in_dec;
  logic [N-1:0][DW-1:0] in_a, in_b;
  logic [DW-1:0]        in_k;
  logic [N-1:0]         in_mask;
  logic                 in_first, in_last, in_multi;
  logic [TAG_W-1:0]     in_tag;
  logic                 out_valid, ovf, busy;
  logic [N-1:0][DW-1:0] out_data;
  logic [N-1:0]         out_mask;
  logic [TAG_W-1:0]     out_tag;
  logic [5:0]           cmd_id;
  ccs_dec_t             dec;

  ccs_cmd_decoder u_dec (.cmd_id(cmd_id), .dec(dec));
  ccs_datapath #(.LINE_BYTES(LINE_BYTES), .DW(DW), .TAG_W(TAG_W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;

  // expected results
  typedef struct {
    logic [N-1:0][DW-1:0] data;
    logic [N-1:0]         mask;
    logic [TAG_W-1:0]     tag;
    longint               due;   // cycle at which it must appear (-1: do not check)
  } exp_t;
  exp_t expq[$];

  // results are taken at the clock edge where adv is high
  always @(posedge clk) begin
    if (rst_n && out_valid && adv) begin
      exp_t e;
      checks++;
      if (expq.size() == 0) begin
        failures++; $display("FAIL unexpected output tag=%h", out_tag);
      end else begin
        e = expq.pop_front();
        if (out_mask !== e.mask || out_tag !== e.tag) begin
          failures++; $display("FAIL mask/tag %h/%h exp %h/%h", out_mask, out_tag, e.mask, e.tag);
        end
        for (int i = 0; i < N; i++)
          if (e.mask[i] && out_data[i] !== e.data[i]) begin
            failures++; $display("FAIL tag=%h lane %0d got %h exp %h", e.tag, i, out_data[i], e.data[i]);
          end
        if (e.due >= 0) begin
          checks++;
          if (cyc != e.due) begin
            failures++; $display("FAIL latency tag=%h at %0d exp %0d", e.tag, cyc, e.due);
          end
        end
      end
    end
    cyc++;
  end

  task automatic drive(input logic [5:0] c, input logic [N-1:0][DW-1:0] a, b,
                       input logic [DW-1:0] k, input logic [N-1:0] m,
                       input bit first, last, multi, input logic [TAG_W-1:0] tag);
    cmd_id = c; #1;
    in_dec = dec; in_a = a; in_b = b; in_k = k; in_mask = m;
    in_first = first; in_last = last; in_multi = multi; in_tag = tag; in_valid = 1;
    @(negedge clk);
    in_valid = 0;
  endtask

  function automatic logic [DW-1:0] rnd();
    case ($urandom_range(0, 3))
      0: return $urandom_range(0, 20) - 10;
      1: return $urandom & 32'h0000_ffff;
      default: return $urandom;
    endcase
  endfunction

  initial begin
    int nlines, len;
    logic [N-1:0][DW-1:0] a, b, r;
    logic [DW-1:0] k;
    logic [N-1:0]  m;
    bit [31:0] va[], vb[];
    exp_t e;
    int tagc = 0;
    int idx;
    ccs_cmd_e ce;
    in_dec = '0; in_a = '0; in_b = '0; in_k = '0; in_mask = '0;
    in_first = 0; in_last = 0; in_multi = 0; in_tag = '0; cmd_id = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int rep = 0; rep < 6; rep++) begin
      for (int c = 0; c < 47; c++) begin
        ce = ccs_cmd_e'(c);
        k = (rep % 2) ? rnd() : $urandom_range(0, 40);
        if (!is_reduce(ce)) begin
          for (int i = 0; i < N; i++) begin a[i] = rnd(); b[i] = rnd(); end
          m = (rep == 0) ? '1 : N'($urandom);
          for (int i = 0; i < N; i++) r[i] = ref_map(ce, a[i], b[i], k);
          e.data = r; e.mask = m; e.tag = TAG_W'(++tagc);
          e.due = cyc + ((ce inside {MULVV, MULVC, SQV, ABSV}) ? 3 : 2);
          expq.push_back(e);
          drive(6'(c), a, b, k, m, 1, 1, 0, e.tag);
        end else begin
          nlines = (rep < 2) ? 1 : $urandom_range(2, 4);
          len = (rep == 0) ? N : (nlines - 1) * N + $urandom_range(1, N);
          if (rep == 1) len = $urandom_range(1, N);
          va = new[len]; vb = new[len];
          foreach (va[i]) begin va[i] = rnd(); vb[i] = rnd(); end
          e.data = '0; e.data[0] = ref_reduce(ce, va, vb); e.mask = N'(1);
          e.tag = TAG_W'(++tagc);
          e.due = cyc + nlines - 1 + ((nlines > 1) ? 4 + LG : 3 + LG);
          expq.push_back(e);
          for (int l = 0; l < nlines; l++) begin
            for (int i = 0; i < N; i++) begin
              idx = l * N + i;
              a[i] = (idx < len) ? va[idx] : rnd();
              b[i] = (idx < len) ? vb[idx] : rnd();
              m[i] = (idx < len);
            end
            drive(6'(c), a, b, k, m, l == 0, l == nlines - 1, nlines > 1, e.tag);
          end
        end
        while (busy) @(negedge clk);
      end
    end
    // back-to-back ADDV (multi-line) and ADDVV streams under random stalls
    for (int j = 0; j < 20; j++) begin
      for (int i = 0; i < N; i++) begin a[i] = rnd(); b[i] = rnd(); end
      for (int i = 0; i < N; i++) r[i] = a[i] + b[i];
      e.data = r; e.mask = '1; e.tag = TAG_W'(++tagc); e.due = -1;
      expq.push_back(e);
      cmd_id = 6'(ADDVV); #1;
      in_dec = dec; in_a = a; in_b = b; in_mask = '1; in_tag = e.tag;
      in_first = 1; in_last = 1; in_multi = 0; in_valid = 1;
      adv = ($urandom_range(0, 2) != 0);
      @(negedge clk);
      while (!adv) begin adv = ($urandom_range(0, 2) != 0); @(negedge clk); end
      in_valid = 0;
    end
    adv = 1;
    while (busy) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d results missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
