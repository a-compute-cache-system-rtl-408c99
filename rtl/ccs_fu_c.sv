// ccs_fu_c: reduction (type C) functional unit of the CCS tree.
//
// Every level below level 1, and the accumulator, is built from type C units.
// A type C unit holds only an adder/subtractor and a logic unit and combines two
// values with ADD, MAX, MIN, AND, OR or XOR (document, Section 4.2.2). MAX and
// MIN use the subtractor as a signed comparator and select one input.
//
// Interface: op1 and op2 are the two values to combine. Purely combinational.
// Design choices: values are two's-complement signed; ADD wraps and raises ovf
// on signed overflow.
module ccs_fu_c
  import ccs_pkg::*;
#(
  parameter int unsigned DW = 32
) (
  input  ccs_cop_e      op,
  input  logic [DW-1:0] op1,
  input  logic [DW-1:0] op2,
  output logic [DW-1:0] result,
  output logic          ovf
);
  logic          sub;
  logic [DW-1:0] yy, sum;
  logic          add_ovf, lt;

  assign sub     = (op == C_MAX) || (op == C_MIN);
  assign yy      = sub ? ~op2 : op2;
  assign sum     = op1 + yy + DW'(sub);
  assign add_ovf = (op1[DW-1] == yy[DW-1]) && (sum[DW-1] != op1[DW-1]);
  assign lt      = sum[DW-1] ^ add_ovf;   // op1 < op2 when subtracting

  always_comb begin
    result = sum;
    ovf    = 1'b0;
    unique case (op)
      C_ADD: begin result = sum; ovf = add_ovf; end
      C_MAX: result = lt ? op2 : op1;
      C_MIN: result = lt ? op1 : op2;
      C_AND: result = op1 & op2;
      C_OR:  result = op1 | op2;
      C_XOR: result = op1 ^ op2;
      default: result = sum;
    endcase
  end
endmodule
