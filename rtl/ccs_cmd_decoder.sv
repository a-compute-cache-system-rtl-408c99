// ccs_cmd_decoder: turns a command id into the control word of every tree level.
//
// The CCS is micro-programmed: each command of the 47-command set is executed
// by setting the operation of level 0 (type A), level 1 (type B) and the
// reduction levels (type C), and by choosing the level whose output is the
// result. This decoder is that table. Example: SSDVV = subtract in level 0,
// square in level 1, add in the tree; IPVV = pass in level 0, multiply in level
// 1, add in the tree; MULVC = pass, multiply by the constant, result at level 1.
//
// The split of each command over the levels follows the document (level 0 for
// element-wise operations without multiplication, level 1 for MUL/SQ/ABS,
// type C levels for ADD/MAX/MIN/AND/OR/XOR reductions). The command numbering
// comes from ccs_pkg. NOTV takes one vector operand (VOP1). An id outside the
// 47 decodes to legal = 0 and is treated as a no-operation by the control unit.
// Purely combinational.
module ccs_cmd_decoder
  import ccs_pkg::*;
(
  input  logic [5:0] cmd_id,
  output ccs_dec_t   dec
);
  always_comb begin
    dec       = '0;
    dec.legal = 1'b1;
    dec.opcls = OPC_VOP2;
    dec.aop   = A_PASS;
    dec.a_k   = 1'b0;
    dec.bop   = B_PASS;
    dec.b_k   = 1'b0;
    dec.cop   = C_ADD;
    dec.out   = OUT_A;
    unique case (cmd_id)
      // ---- arithmetic, two vectors
      ADDVV:  dec.aop = A_ADD;
      SUBVV:  dec.aop = A_SUB;
      MULVV:  begin dec.bop = B_MUL; dec.out = OUT_B; end
      SSDVV:  begin dec.aop = A_SUB; dec.bop = B_SQ;  dec.out = OUT_RED; end
      SADVV:  begin dec.aop = A_SUB; dec.bop = B_ABS; dec.out = OUT_RED; end
      IPVV:   begin dec.bop = B_MUL; dec.out = OUT_RED; end
      // ---- arithmetic, vector and constant
      ADDVC:  begin dec.opcls = OPC_VCOP; dec.aop = A_ADD; dec.a_k = 1'b1; end
      SUBVC:  begin dec.opcls = OPC_VCOP; dec.aop = A_SUB; dec.a_k = 1'b1; end
      MULVC:  begin dec.opcls = OPC_VCOP; dec.bop = B_MUL; dec.b_k = 1'b1; dec.out = OUT_B; end
      LESSVC: begin dec.opcls = OPC_VCOP; dec.aop = A_LT; dec.a_k = 1'b1; end
      GRTRVC: begin dec.opcls = OPC_VCOP; dec.aop = A_GT; dec.a_k = 1'b1; end
      EQUVC:  begin dec.opcls = OPC_VCOP; dec.aop = A_EQ; dec.a_k = 1'b1; end
      // ---- arithmetic, one vector
      COMP2V: begin dec.opcls = OPC_VOP1; dec.aop = A_NEG; end
      ADDV:   begin dec.opcls = OPC_VOP1; dec.cop = C_ADD; dec.out = OUT_RED; end
      MAXV:   begin dec.opcls = OPC_VOP1; dec.cop = C_MAX; dec.out = OUT_RED; end
      MINV:   begin dec.opcls = OPC_VOP1; dec.cop = C_MIN; dec.out = OUT_RED; end
      SQV:    begin dec.opcls = OPC_VOP1; dec.bop = B_SQ;  dec.out = OUT_B; end
      ABSV:   begin dec.opcls = OPC_VOP1; dec.bop = B_ABS; dec.out = OUT_B; end
      RELUV:  begin dec.opcls = OPC_VOP1; dec.aop = A_RELU; end
      // ---- shifts
      SLLVV:  dec.aop = A_SLL;
      SRLVV:  dec.aop = A_SRL;
      SLAVV:  dec.aop = A_SLA;
      SRAVV:  dec.aop = A_SRA;
      ROLVV:  dec.aop = A_ROL;
      RORVV:  dec.aop = A_ROR;
      SLLVC:  begin dec.opcls = OPC_VCOP; dec.aop = A_SLL; dec.a_k = 1'b1; end
      SRLVC:  begin dec.opcls = OPC_VCOP; dec.aop = A_SRL; dec.a_k = 1'b1; end
      SLAVC:  begin dec.opcls = OPC_VCOP; dec.aop = A_SLA; dec.a_k = 1'b1; end
      SRAVC:  begin dec.opcls = OPC_VCOP; dec.aop = A_SRA; dec.a_k = 1'b1; end
      ROLVC:  begin dec.opcls = OPC_VCOP; dec.aop = A_ROL; dec.a_k = 1'b1; end
      RORVC:  begin dec.opcls = OPC_VCOP; dec.aop = A_ROR; dec.a_k = 1'b1; end
      // ---- logic
      ANDVV:  dec.aop = A_AND;
      NANDVV: dec.aop = A_NAND;
      ORVV:   dec.aop = A_OR;
      NORVV:  dec.aop = A_NOR;
      XORVV:  dec.aop = A_XOR;
      XNORVV: dec.aop = A_XNOR;
      ANDVC:  begin dec.opcls = OPC_VCOP; dec.aop = A_AND;  dec.a_k = 1'b1; end
      NANDVC: begin dec.opcls = OPC_VCOP; dec.aop = A_NAND; dec.a_k = 1'b1; end
      ORVC:   begin dec.opcls = OPC_VCOP; dec.aop = A_OR;   dec.a_k = 1'b1; end
      NORVC:  begin dec.opcls = OPC_VCOP; dec.aop = A_NOR;  dec.a_k = 1'b1; end
      XORVC:  begin dec.opcls = OPC_VCOP; dec.aop = A_XOR;  dec.a_k = 1'b1; end
      XNORVC: begin dec.opcls = OPC_VCOP; dec.aop = A_XNOR; dec.a_k = 1'b1; end
      NOTV:   begin dec.opcls = OPC_VOP1; dec.aop = A_NOT; end
      ANDV:   begin dec.opcls = OPC_VOP1; dec.cop = C_AND; dec.out = OUT_RED; end
      ORV:    begin dec.opcls = OPC_VOP1; dec.cop = C_OR;  dec.out = OUT_RED; end
      XORV:   begin dec.opcls = OPC_VOP1; dec.cop = C_XOR; dec.out = OUT_RED; end
      default: begin dec.legal = 1'b0; dec.opcls = OPC_VOP1; end
    endcase
  end
endmodule
