// ccs_fu_b: level-1 (type B) functional unit of the CCS tree, one per lane.
//
// Type B units are the only ones with an integer multiplier; they also hold an
// adder/subtractor. They perform MUL (element times element or times the
// constant), SQ (square) and ABS, and otherwise pass the level-0 result on. The
// multiplier sits in the second level so that a command such as SSDVV can first
// subtract in level 0 and then square here (document, Section 4.2.2).
//
// Interface: op1 is the level-0 result of this lane, op2 the lane's element of
// the second vector (forwarded past level 0) and konst the command constant;
// use_k makes MUL use konst. Purely combinational.
//
// Design choices: the product is the low DW bits of the signed product, ovf is
// raised when the signed product does not fit in DW bits; ABS is 0 - op1 for a
// negative op1 and raises ovf for the most negative value.
module ccs_fu_b
  import ccs_pkg::*;
#(
  parameter int unsigned DW = 32
) (
  input  ccs_bop_e      op,
  input  logic          use_k,
  input  logic [DW-1:0] op1,
  input  logic [DW-1:0] op2,
  input  logic [DW-1:0] konst,
  output logic [DW-1:0] result,
  output logic          ovf
);
  logic signed [DW-1:0]   ma, mb;
  logic signed [2*DW-1:0] prod;
  logic        [DW-1:0]   neg;
  logic                   prod_ovf;

  // multiplier operands
  always_comb begin
    ma = $signed(op1);
    mb = $signed(use_k ? konst : op2);
    if (op == B_SQ) mb = $signed(op1);
  end
  assign prod     = ma * mb;
  assign prod_ovf = (prod[2*DW-1:DW-1] != {(DW+1){1'b0}}) && (prod[2*DW-1:DW-1] != {(DW+1){1'b1}});

  // adder/subtractor used for ABS: 0 - op1
  assign neg = '0 - op1;

  always_comb begin
    result = op1;
    ovf    = 1'b0;
    unique case (op)
      B_PASS: result = op1;
      B_MUL, B_SQ: begin result = prod[DW-1:0]; ovf = prod_ovf; end
      B_ABS: begin
        result = op1[DW-1] ? neg : op1;
        ovf    = op1[DW-1] && neg[DW-1];
      end
      default: result = op1;
    endcase
  end
endmodule
