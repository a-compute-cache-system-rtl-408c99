// ccs_fu_a: level-0 (type A) functional unit of the CCS tree, one per lane.
//
// The unit holds an adder/subtractor, a barrel shifter and a logic unit, and a
// result multiplexer that picks one of them or a 0/1 flag built from the
// subtractor (as in the document's level-0 unit drawing, whose result mux has
// two constant '0' inputs). It performs every element-wise command that needs
// no multiplication: ADD, SUB, COMP2 (0 - a), SLL, SRL, SLA, SRA, ROL, ROR, AND,
// NAND, OR, NOR, XOR, XNOR, NOT, the three comparisons with a constant and ReLU.
// For commands that do their work further down the tree it passes op1 through.
//
// Interface: op1 is the element of the first vector, op2 the element of the
// second vector and konst the command constant; use_k selects konst instead of
// op2 as the second operand. Purely combinational; the pipeline register that
// follows it lives in ccs_datapath.
//
// Design choices where the document gives only the operation name: elements are
// two's-complement signed; ADD/SUB/COMP2 wrap and raise ovf on signed overflow;
// a shift or rotate uses the low log2(DW) bits of its amount; SLA keeps the sign
// bit and shifts the other bits left; comparisons are signed and return 1 or 0;
// ReLU uses the subtractor to test a > 0.
module ccs_fu_a
  import ccs_pkg::*;
#(
  parameter int unsigned DW = 32
) (
  input  ccs_aop_e         op,
  input  logic             use_k,
  input  logic [DW-1:0]    op1,
  input  logic [DW-1:0]    op2,
  input  logic [DW-1:0]    konst,
  output logic [DW-1:0]    result,
  output logic             ovf
);
  localparam int unsigned SHW = $clog2(DW);

  logic [DW-1:0]  opb;
  logic [DW-1:0]  x, y, yy;
  logic           sub;
  logic [DW-1:0]  sum;
  logic           add_ovf, lt, eq;
  logic [SHW-1:0] sh;
  logic [DW-1:0]  shl, shr;

  assign opb = use_k ? konst : op2;

  // ---------------------------------------------------------- adder/subtractor
  always_comb begin
    x   = op1;
    y   = opb;
    sub = 1'b0;
    unique case (op)
      A_ADD:                     sub = 1'b0;
      A_SUB, A_LT, A_GT, A_EQ:   sub = 1'b1;
      A_NEG:  begin x = '0; y = op1; sub = 1'b1; end
      A_RELU: begin x = op1; y = '0; sub = 1'b1; end
      default:                   sub = 1'b0;
    endcase
  end
  assign yy      = sub ? ~y : y;
  assign sum     = x + yy + DW'(sub);
  assign add_ovf = (x[DW-1] == yy[DW-1]) && (sum[DW-1] != x[DW-1]);
  assign lt      = sum[DW-1] ^ add_ovf;
  assign eq      = (sum == '0);

  // ------------------------------------------------------------------ shifter
  assign sh  = opb[SHW-1:0];
  assign shl = op1 << sh;
  assign shr = op1 >> sh;

  // ------------------------------------------------------------ result mux
  always_comb begin
    result = op1;
    ovf    = 1'b0;
    unique case (op)
      A_PASS: result = op1;
      A_ADD, A_SUB, A_NEG: begin result = sum; ovf = add_ovf; end
      A_SLL:  result = shl;
      A_SRL:  result = shr;
      A_SLA:  result = {op1[DW-1], shl[DW-2:0]};
      A_SRA:  result = DW'($signed(op1) >>> sh);
      A_ROL:  result = (sh == '0) ? op1 : (shl | (op1 >> (DW - 32'(sh))));
      A_ROR:  result = (sh == '0) ? op1 : (shr | (op1 << (DW - 32'(sh))));
      A_AND:  result = op1 & opb;
      A_NAND: result = ~(op1 & opb);
      A_OR:   result = op1 | opb;
      A_NOR:  result = ~(op1 | opb);
      A_XOR:  result = op1 ^ opb;
      A_XNOR: result = ~(op1 ^ opb);
      A_NOT:  result = ~op1;
      A_LT:   result = DW'(lt);
      A_GT:   result = DW'(!lt && !eq);
      A_EQ:   result = DW'(eq);
      // a > 0  <=>  (a - 0) neither negative nor zero
      A_RELU: result = (!lt && !eq) ? op1 : '0;
      default: result = op1;
    endcase
  end
endmodule
