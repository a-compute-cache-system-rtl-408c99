// tb_ccs_ref_pkg: reference model of the CCS command set for the testbenches.
//
// Written straight from the command definitions (32-bit two's-complement
// elements), independently of the RTL's level-by-level split: ref_map gives
// one result element of a map command, ref_reduce folds a whole vector for a
// reduce command. Opcodes are the numbers of ccs_pkg::ccs_cmd_e.
package tb_ccs_ref_pkg;
  import ccs_pkg::*;

  function automatic bit is_reduce(ccs_cmd_e c);
    return c inside {SSDVV, SADVV, IPVV, ADDV, MAXV, MINV, ANDV, ORV, XORV};
  endfunction

  function automatic bit two_vec(ccs_cmd_e c);
    return c inside {ADDVV, SUBVV, MULVV, SSDVV, SADVV, IPVV, SLLVV, SRLVV, SLAVV,
                     SRAVV, ROLVV, RORVV, ANDVV, NANDVV, ORVV, NORVV, XORVV, XNORVV};
  endfunction

  function automatic bit [31:0] rotl(bit [31:0] a, int s);
    bit [31:0] r = a;
    for (int i = 0; i < s; i++) r = {r[30:0], r[31]};
    return r;
  endfunction

  function automatic bit [31:0] ref_map(ccs_cmd_e c, bit [31:0] a, bit [31:0] b, bit [31:0] k);
    int        sa = int'(a), sb = int'(b), sk = int'(k);
    int        sv = two_vec(c) ? int'(b[4:0]) : int'(k[4:0]);
    longint    p;
    case (c)
      ADDVV:  return a + b;
      SUBVV:  return a - b;
      MULVV:  begin p = longint'(sa) * longint'(sb); return p[31:0]; end
      ADDVC:  return a + k;
      SUBVC:  return a - k;
      MULVC:  begin p = longint'(sa) * longint'(sk); return p[31:0]; end
      COMP2V: return -a;
      LESSVC: return (sa < sk) ? 1 : 0;
      GRTRVC: return (sa > sk) ? 1 : 0;
      EQUVC:  return (a == k) ? 1 : 0;
      SQV:    begin p = longint'(sa) * longint'(sa); return p[31:0]; end
      ABSV:   return (sa < 0) ? -a : a;
      RELUV:  return (sa > 0) ? a : 0;
      SLLVV, SLLVC: return a << sv;
      SRLVV, SRLVC: return a >> sv;
      SLAVV, SLAVC: begin bit [31:0] t = a << sv; t[31] = a[31]; return t; end
      SRAVV, SRAVC: return 32'(sa >>> sv);
      ROLVV, ROLVC: return rotl(a, sv);
      RORVV, RORVC: return rotl(a, (32 - sv) % 32);
      ANDVV:  return a & b;   ANDVC:  return a & k;
      NANDVV: return ~(a & b); NANDVC: return ~(a & k);
      ORVV:   return a | b;   ORVC:   return a | k;
      NORVV:  return ~(a | b); NORVC:  return ~(a | k);
      XORVV:  return a ^ b;   XORVC:  return a ^ k;
      XNORVV: return ~(a ^ b); XNORVC: return ~(a ^ k);
      NOTV:   return ~a;
      default: return 32'hDEAD_BEEF;
    endcase
  endfunction

  function automatic bit [31:0] ref_reduce(ccs_cmd_e c, bit [31:0] a[], bit [31:0] b[]);
    bit [31:0] acc;
    int        m;
    case (c)
      ANDV:    acc = '1;
      MAXV:    acc = 32'h8000_0000;
      MINV:    acc = 32'h7fff_ffff;
      default: acc = 0;
    endcase
    foreach (a[i]) begin
      int d = int'(a[i]) - int'(b[i]);
      case (c)
        SSDVV: acc += 32'(d * d);
        SADVV: acc += (d < 0) ? 32'(-d) : 32'(d);
        IPVV:  acc += 32'(int'(a[i]) * int'(b[i]));
        ADDV:  acc += a[i];
        MAXV:  begin m = int'(a[i]); if (m > int'(acc)) acc = a[i]; end
        MINV:  begin m = int'(a[i]); if (m < int'(acc)) acc = a[i]; end
        ANDV:  acc &= a[i];
        ORV:   acc |= a[i];
        XORV:  acc ^= a[i];
        default: ;
      endcase
    end
    return acc;
  endfunction
endpackage
