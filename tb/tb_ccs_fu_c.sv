// tb_ccs_fu_c: checks the type C unit (ADD, MAX, MIN, AND, OR, XOR, signed) and
// its addition overflow flag with random and corner-case operands.
module tb_ccs_fu_c;
  import ccs_pkg::*;

  ccs_cop_e    op;
  logic [31:0] op1, op2, result;
  logic        ovf;
  int checks = 0, failures = 0;

  ccs_fu_c #(.DW(32)) dut (.*);

  function automatic logic [31:0] pick();
    case ($urandom_range(0, 5))
      0: return 32'h8000_0000;
      1: return 32'h7fff_ffff;
      2: return $urandom_range(0, 10) - 5;
      default: return $urandom;
    endcase
  endfunction

  initial begin
    logic [31:0] exp;
    longint s;
    for (int n = 0; n < 3000; n++) begin
      op = ccs_cop_e'(n % 6);
      op1 = pick(); op2 = pick();
      #1;
      case (op)
        C_ADD: exp = op1 + op2;
        C_MAX: exp = (int'(op1) > int'(op2)) ? op1 : op2;
        C_MIN: exp = (int'(op1) < int'(op2)) ? op1 : op2;
        C_AND: exp = op1 & op2;
        C_OR:  exp = op1 | op2;
        default: exp = op1 ^ op2;
      endcase
      checks++;
      if (result !== exp) begin failures++; $display("FAIL %s %h %h got %h exp %h", op.name(), op1, op2, result, exp); end
      if (op == C_ADD) begin
        s = longint'(int'(op1)) + longint'(int'(op2));
        checks++;
        if (ovf !== ((s > 64'sd2147483647) || (s < -64'sd2147483648))) begin
          failures++; $display("FAIL ovf %h %h", op1, op2);
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
