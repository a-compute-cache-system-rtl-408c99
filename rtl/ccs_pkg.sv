// ccs_pkg: types and constants shared by the Cache Compute System (CCS).
//
// The CCS is a SIMD engine hung off the last-level cache (LLC). It reads whole
// cache lines, pushes them through a pipelined binary tree of functional units
// (one row of type A units, one row of type B units, log2(N) levels of type C
// units and an accumulator) and writes whole result lines back to the LLC.
//
// This package holds the 47-entry command set, the micro-operations each level
// of the tree understands, and the decoded-command record that travels down the
// pipeline next to the data. The command list and its grouping (VOP2 / VCOP /
// VOP1, map / reduce) follow the document's command table; the numeric opcode of
// each command is this design's choice: commands are numbered 0..46 in the order
// in which the document lists them in its per-command benchmark chart.
package ccs_pkg;

  // ---------------------------------------------------------------- commands
  typedef enum logic [5:0] {
    ADDVV  = 6'd0,  SUBVV  = 6'd1,  MULVV  = 6'd2,  SSDVV  = 6'd3,
    SADVV  = 6'd4,  IPVV   = 6'd5,  ADDVC  = 6'd6,  SUBVC  = 6'd7,
    MULVC  = 6'd8,  COMP2V = 6'd9,  ADDV   = 6'd10, MAXV   = 6'd11,
    MINV   = 6'd12, LESSVC = 6'd13, GRTRVC = 6'd14, EQUVC  = 6'd15,
    SQV    = 6'd16, ABSV   = 6'd17, RELUV  = 6'd18, SLLVV  = 6'd19,
    SRLVV  = 6'd20, SLAVV  = 6'd21, SRAVV  = 6'd22, ROLVV  = 6'd23,
    RORVV  = 6'd24, SLLVC  = 6'd25, SRLVC  = 6'd26, SLAVC  = 6'd27,
    SRAVC  = 6'd28, ROLVC  = 6'd29, RORVC  = 6'd30, ANDVV  = 6'd31,
    NANDVV = 6'd32, ORVV   = 6'd33, NORVV  = 6'd34, XORVV  = 6'd35,
    XNORVV = 6'd36, ANDVC  = 6'd37, NANDVC = 6'd38, ORVC   = 6'd39,
    NORVC  = 6'd40, XORVC  = 6'd41, XNORVC = 6'd42, NOTV   = 6'd43,
    ANDV   = 6'd44, ORV    = 6'd45, XORV   = 6'd46
  } ccs_cmd_e;


  // Operand class: two vectors, vector + constant, one vector.
  typedef enum logic [1:0] {OPC_VOP2 = 2'd0, OPC_VCOP = 2'd1, OPC_VOP1 = 2'd2} ccs_opcls_e;

  // Level-0 (type A) micro-operations: adder/subtractor, shifter, logic unit.
  typedef enum logic [4:0] {
    A_PASS, A_ADD, A_SUB, A_NEG,
    A_SLL, A_SRL, A_SLA, A_SRA, A_ROL, A_ROR,
    A_AND, A_NAND, A_OR, A_NOR, A_XOR, A_XNOR, A_NOT,
    A_LT, A_GT, A_EQ, A_RELU
  } ccs_aop_e;

  // Level-1 (type B) micro-operations: adder/subtractor and multiplier.
  typedef enum logic [1:0] {B_PASS, B_MUL, B_SQ, B_ABS} ccs_bop_e;

  // Reduction (type C) micro-operations: adder/subtractor and logic unit.
  typedef enum logic [2:0] {C_ADD, C_MAX, C_MIN, C_AND, C_OR, C_XOR} ccs_cop_e;

  // Level whose output carries the result. OUT_RED is split at run time into
  // the tree output (single run) and the accumulator output (several runs).
  typedef enum logic [1:0] {OUT_A = 2'd0, OUT_B = 2'd1, OUT_RED = 2'd2} ccs_out_e;

  // Decoded command: the control word of every level.
  typedef struct packed {
    logic       legal;   // command id is one of the 47
    ccs_opcls_e opcls;   // operands to fetch
    ccs_aop_e   aop;     // level-0 operation
    logic       a_k;     // level-0 second operand is the constant
    ccs_bop_e   bop;     // level-1 operation
    logic       b_k;     // level-1 multiplier second operand is the constant
    ccs_cop_e   cop;     // reduction operation (tree and accumulator)
    ccs_out_e   out;     // result level
  } ccs_dec_t;

  // Output-level rank used to keep results in order at the single write port:
  // 0 = level-0 map, 1 = level-1 map, 2 = tree output, 3 = accumulator.
  function automatic logic [1:0] out_rank(ccs_out_e out, logic multi);
    case (out)
      OUT_A:   return 2'd0;
      OUT_B:   return 2'd1;
      default: return multi ? 2'd3 : 2'd2;
    endcase
  endfunction

  // Programming-interface register offsets (bytes, 64-bit registers).
  localparam logic [7:0] PI_CMD_ID    = 8'h00;
  localparam logic [7:0] PI_OP_LEN    = 8'h08;
  localparam logic [7:0] PI_K         = 8'h10;
  localparam logic [7:0] PI_OPA_ADDR  = 8'h18;
  localparam logic [7:0] PI_OPB_ADDR  = 8'h20;
  localparam logic [7:0] PI_RES_ADDR  = 8'h28;
  localparam logic [7:0] PI_STRIDE    = 8'h30;
  localparam logic [7:0] PI_START     = 8'h38;
  localparam logic [7:0] PI_READINESS = 8'h40;
  localparam logic [7:0] PI_STATUS    = 8'h48;

endpackage
