// ccs_operand_buffer: line buffer for the first operand of two-vector commands.
//
// The CCS has a single read path from the cache, so for a command with two
// vector operands it fetches them one after the other: the first line is held
// here until the matching line of the second operand arrives, and then both
// enter the tree together (document, Sections 3.1 and 4.2.1).
//
// Interface: load writes d into the buffer and sets valid; consume clears valid
// (the held line has entered the pipeline). A load and a consume in the same
// cycle keep the buffer full with the new line. Timing: q is the register
// output, valid one cycle after load. Reset empties the buffer.
module ccs_operand_buffer #(
  parameter int unsigned LINE_BYTES = 64
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      load,
  input  logic                      consume,
  input  logic [LINE_BYTES*8-1:0]   d,
  output logic [LINE_BYTES*8-1:0]   q,
  output logic                      valid
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q     <= '0;
      valid <= 1'b0;
    end else begin
      if (load) q <= d;
      if (load)         valid <= 1'b1;
      else if (consume) valid <= 1'b0;
    end
  end
endmodule
