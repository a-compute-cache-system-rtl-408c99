// tb_ccs_operand_buffer: loads random lines, consumes them, and checks the held
// line and the valid flag after each step, including load and consume in the
// same cycle and reset.
module tb_ccs_operand_buffer;
  localparam int LINE_BYTES = 64;
  logic clk = 0, rst_n = 0, load = 0, consume = 0, valid;
  logic [LINE_BYTES*8-1:0] d = '0, q;
  int checks = 0, failures = 0;

  ccs_operand_buffer #(.LINE_BYTES(LINE_BYTES)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    logic [LINE_BYTES*8-1:0] held;
    bit v;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (valid !== 1'b0) begin failures++; $display("FAIL valid after reset"); end
    held = '0; v = 0;
    for (int n = 0; n < 400; n++) begin
      load = $urandom_range(0, 1); consume = $urandom_range(0, 1);
      for (int w = 0; w < LINE_BYTES / 4; w++) d[w*32 +: 32] = $urandom;
      @(negedge clk);
      if (load) begin held = d; v = 1; end
      else if (consume) v = 0;
      checks++;
      if (valid !== v || (v && q !== held)) begin failures++; $display("FAIL step %0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
