// tb_ccs_cmd_decoder: checks the decoding of all 64 command ids against an
// independent table of the command set: operand class (two vectors, vector and
// constant, one vector), map or reduce, the level holding a map result (level 1
// exactly for the commands that multiply or take an absolute value), the
// reduction operation, and the level-0/level-1 split of the compound commands
// SSDVV, SADVV and IPVV. Ids 47..63 must decode as illegal.
module tb_ccs_cmd_decoder;
  import ccs_pkg::*;

  logic [5:0] cmd_id;
  ccs_dec_t   dec;
  int checks = 0, failures = 0;

  ccs_cmd_decoder dut (.*);

  // class letter per command, in opcode order: 2 = two vectors, K = vector and
  // constant, 1 = one vector
  localparam string CLS = "222222KKK1111KKK111222222KKKKKK222222KKKKKK1111";
  // result: A = level 0, B = level 1, R = reduction
  localparam string RES = "AABRRRAABARRRAAABBAAAAAAAAAAAAAAAAAAAAAAAAAARRR";

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL id %0d: %s (%p)", cmd_id, what, dec); end
  endtask

  initial begin
    string res = RES;
    for (int c = 0; c < 64; c++) begin
      cmd_id = 6'(c);
      #1;
      if (c >= 47) begin
        chk(!dec.legal, "illegal id decoded as legal");
        continue;
      end
      chk(dec.legal, "legal id");
      case (CLS[c])
        "2": chk(dec.opcls == OPC_VOP2, "class VOP2");
        "K": chk(dec.opcls == OPC_VCOP && (dec.a_k || dec.b_k), "class VCOP uses constant");
        default: chk(dec.opcls == OPC_VOP1, "class VOP1");
      endcase
      case (res[c])
        "A": chk(dec.out == OUT_A, "result at level 0");
        "B": chk(dec.out == OUT_B, "result at level 1");
        default: chk(dec.out == OUT_RED, "result from reduction");
      endcase
    end
    cmd_id = 6'(SSDVV); #1; chk(dec.aop == A_SUB && dec.bop == B_SQ && dec.cop == C_ADD, "SSDVV split");
    cmd_id = 6'(SADVV); #1; chk(dec.aop == A_SUB && dec.bop == B_ABS && dec.cop == C_ADD, "SADVV split");
    cmd_id = 6'(IPVV);  #1; chk(dec.aop == A_PASS && dec.bop == B_MUL && dec.cop == C_ADD, "IPVV split");
    cmd_id = 6'(MAXV);  #1; chk(dec.cop == C_MAX && dec.bop == B_PASS, "MAXV");
    cmd_id = 6'(MINV);  #1; chk(dec.cop == C_MIN, "MINV");
    cmd_id = 6'(XORV);  #1; chk(dec.cop == C_XOR, "XORV");
    cmd_id = 6'(MULVC); #1; chk(dec.bop == B_MUL && dec.b_k, "MULVC");
    cmd_id = 6'(RELUV); #1; chk(dec.aop == A_RELU, "RELUV");
    cmd_id = 6'(SRLVV); #1; chk(dec.aop == A_SRL && !dec.a_k, "SRLVV");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
