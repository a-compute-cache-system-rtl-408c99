// tb_ccs_fu_a: checks every level-0 operation of the type A unit against the
// reference command model, with random and corner-case operands, both operand
// sources (second vector or constant) and the signed-overflow flag.
module tb_ccs_fu_a;
  import ccs_pkg::*;
  import tb_ccs_ref_pkg::*;

  ccs_aop_e    op;
  logic        use_k;
  logic [31:0] op1, op2, konst, result;
  logic        ovf;
  int checks = 0, failures = 0;

  ccs_fu_a #(.DW(32)) dut (.*);

  // the command that performs this level-0 operation alone
  function automatic ccs_cmd_e cmd_of(ccs_aop_e o, bit k);
    case (o)
      A_ADD: return k ? ADDVC : ADDVV;   A_SUB: return k ? SUBVC : SUBVV;
      A_NEG: return COMP2V;
      A_SLL: return k ? SLLVC : SLLVV;   A_SRL: return k ? SRLVC : SRLVV;
      A_SLA: return k ? SLAVC : SLAVV;   A_SRA: return k ? SRAVC : SRAVV;
      A_ROL: return k ? ROLVC : ROLVV;   A_ROR: return k ? RORVC : RORVV;
      A_AND: return k ? ANDVC : ANDVV;   A_NAND: return k ? NANDVC : NANDVV;
      A_OR:  return k ? ORVC : ORVV;     A_NOR: return k ? NORVC : NORVV;
      A_XOR: return k ? XORVC : XORVV;   A_XNOR: return k ? XNORVC : XNORVV;
      A_NOT: return NOTV;
      A_LT:  return LESSVC;  A_GT: return GRTRVC;  A_EQ: return EQUVC;
      A_RELU: return RELUV;
      default: return ADDVV;
    endcase
  endfunction

  function automatic logic [31:0] pick();
    case ($urandom_range(0, 5))
      0: return 32'h8000_0000;
      1: return 32'h7fff_ffff;
      2: return $urandom_range(0, 40) - 20;
      default: return $urandom;
    endcase
  endfunction

  initial begin
    logic [31:0] exp;
    bit k, exp_ovf;
    longint s;
    for (int o = 0; o <= int'(A_RELU); o++) begin
      for (int n = 0; n < 300; n++) begin
        op = ccs_aop_e'(o);
        k = (op inside {A_LT, A_GT, A_EQ}) ? 1 : $urandom_range(0, 1);
        use_k = k;
        op1 = pick(); op2 = pick(); konst = pick();
        if (n == 0) begin op1 = 5; op2 = 5; konst = 5; end
        #1;
        exp = (op == A_PASS) ? op1 : ref_map(cmd_of(op, k), op1, op2, konst);
        checks++;
        if (result !== exp) begin
          failures++;
          $display("FAIL %s k=%0d a=%h b=%h k=%h got %h exp %h", op.name(), k, op1, op2, konst, result, exp);
        end
        if (op inside {A_ADD, A_SUB, A_NEG}) begin
          s = (op == A_ADD) ? longint'(int'(op1)) + longint'(int'(k ? konst : op2))
            : (op == A_SUB) ? longint'(int'(op1)) - longint'(int'(k ? konst : op2))
            : -longint'(int'(op1));
          exp_ovf = (s > 64'sd2147483647) || (s < -64'sd2147483648);
          checks++;
          if (ovf !== exp_ovf) begin failures++; $display("FAIL ovf %s a=%h", op.name(), op1); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
