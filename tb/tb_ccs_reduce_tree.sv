// tb_ccs_reduce_tree: streams random vectors (one per cycle, random operation)
// through the 16-input tree, checks each reduced value and its sideband word
// against a reference fold, checks the latency of log2(16) = 4 cycles, and
// repeats with the stall input toggling at random.
module tb_ccs_reduce_tree;
  import ccs_pkg::*;
  localparam int N = 16, DW = 32, SB_W = 12, LG = 4;

  logic clk = 0, rst_n = 0, adv = 1, in_valid = 0;
  ccs_cop_e in_op, out_op;
  logic [N-1:0][DW-1:0] in_data;
  logic [SB_W-1:0] in_sb = '0, out_sb;
  logic out_valid, ovf, busy;
  logic [DW-1:0] out_data;

  ccs_reduce_tree #(.N(N), .DW(DW), .SB_W(SB_W)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  typedef struct { logic [DW-1:0] v; logic [SB_W-1:0] sb; longint due; } e_t;
  e_t q[$];

  function automatic logic [DW-1:0] fold(ccs_cop_e o, logic [N-1:0][DW-1:0] d);
    logic [DW-1:0] a = d[0];
    for (int i = 1; i < N; i++)
      case (o)
        C_ADD: a = a + d[i];
        C_MAX: a = (int'(d[i]) > int'(a)) ? d[i] : a;
        C_MIN: a = (int'(d[i]) < int'(a)) ? d[i] : a;
        C_AND: a = a & d[i];
        C_OR:  a = a | d[i];
        default: a = a ^ d[i];
      endcase
    return a;
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid && adv) begin
      e_t e;
      checks++;
      if (q.size() == 0) begin failures++; $display("FAIL unexpected output"); end
      else begin
        e = q.pop_front();
        if (out_data !== e.v || out_sb !== e.sb) begin
          failures++; $display("FAIL got %h/%h exp %h/%h", out_data, out_sb, e.v, e.sb);
        end
        if (e.due >= 0) begin
          checks++;
          if (cyc != e.due) begin failures++; $display("FAIL latency %0d exp %0d", cyc, e.due); end
        end
      end
    end
    cyc++;
  end

  initial begin
    e_t e;
    in_op = C_ADD; in_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int ph = 0; ph < 2; ph++) begin
      for (int n = 0; n < 300; n++) begin
        @(negedge clk);
        if (ph == 1) adv = ($urandom_range(0, 2) != 0);
        in_valid = ($urandom_range(0, 3) != 0);
        in_op = ccs_cop_e'($urandom_range(0, 5));
        for (int i = 0; i < N; i++) in_data[i] = ($urandom_range(0, 1)) ? $urandom : $urandom_range(0, 20) - 10;
        in_sb = SB_W'($urandom);
        if (in_valid && adv) begin
          e.v = fold(in_op, in_data); e.sb = in_sb;
          e.due = (ph == 0) ? cyc + LG : -1;
          q.push_back(e);
        end
      end
      @(negedge clk); in_valid = 0; adv = 1;
      repeat (LG + 2) @(negedge clk);
    end
    checks++;
    if (q.size() != 0 || busy) begin failures++; $display("FAIL %0d results missing", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
