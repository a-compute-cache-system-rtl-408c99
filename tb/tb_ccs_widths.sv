// tb_ccs_widths: runs the control unit and processing tree built for 16-bit
// elements (32 lanes per 64-byte line) and for 8-bit elements (64 lanes), the
// two other element sizes of the CCS evaluation, each against a reference for
// its width (see tb_ccs_width_run), and reports the combined counts.
module tb_ccs_widths;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic d16, d8;
  int c16, f16, c8, f8;

  tb_ccs_width_run #(.DW(16)) u16 (.clk, .rst_n, .done(d16), .checks(c16), .failures(f16));
  tb_ccs_width_run #(.DW(8))  u8  (.clk, .rst_n, .done(d8),  .checks(c8),  .failures(f8));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (d16 && d8);
    $display("TB_RESULT checks=%0d failures=%0d", c16 + c8, f16 + f8);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c16 + c8, f16 + f8 + 1);
    $finish;
  end
endmodule
