// tb_ccs_fu_b: checks the type B unit (pass, multiply by element or constant,
// square, absolute value) and its overflow flag with random and corner-case
// operands against arithmetic done in 64 bits in the testbench.
module tb_ccs_fu_b;
  import ccs_pkg::*;

  ccs_bop_e    op;
  logic        use_k;
  logic [31:0] op1, op2, konst, result;
  logic        ovf;
  int checks = 0, failures = 0;

  ccs_fu_b #(.DW(32)) dut (.*);

  function automatic logic [31:0] pick();
    case ($urandom_range(0, 5))
      0: return 32'h8000_0000;
      1: return 32'h7fff_ffff;
      2: return $urandom_range(0, 80000) - 40000;
      default: return $urandom;
    endcase
  endfunction

  initial begin
    longint p, m;
    logic [31:0] exp;
    bit exp_ovf;
    for (int n = 0; n < 4000; n++) begin
      op = ccs_bop_e'(n % 4);
      use_k = $urandom_range(0, 1);
      op1 = pick(); op2 = pick(); konst = pick();
      #1;
      m = longint'(int'(use_k ? konst : op2));
      case (op)
        B_PASS: begin exp = op1; exp_ovf = 0; end
        B_MUL: begin p = longint'(int'(op1)) * m; exp = p[31:0];
                     exp_ovf = (p > 64'sd2147483647) || (p < -64'sd2147483648); end
        B_SQ:  begin p = longint'(int'(op1)) * longint'(int'(op1)); exp = p[31:0];
                     exp_ovf = (p > 64'sd2147483647); end
        default: begin
          p = longint'(int'(op1)); if (p < 0) p = -p; exp = p[31:0];
          exp_ovf = (op1 == 32'h8000_0000);
        end
      endcase
      checks += 2;
      if (result !== exp) begin failures++; $display("FAIL %s a=%h b=%h got %h exp %h", op.name(), op1, op2, result, exp); end
      if (ovf !== exp_ovf) begin failures++; $display("FAIL ovf %s a=%h b=%h", op.name(), op1, op2); end
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
