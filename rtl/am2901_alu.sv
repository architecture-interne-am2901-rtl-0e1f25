// am2901_alu: the 4-bit ALU of the AM2901 slice with its status flags.
//
// The function code fn (I[5:3]) selects one of eight operations on R and S:
// R+S, S-R, R-S, R or S, R and S, (not R) and S, R xor S, R xnor S.
// Subtraction is done by the adder on the complemented operand; the "+1" of
// two's complement is not added inside: the carry input cin supplies it, so
// S-R with cin = 1 is the true difference and with cin = 0 is S-R-1. Likewise
// cout after a subtraction is a "no borrow" carry, the inverse of a borrow.
//
// Structure: the operand to complement (R for S-R, (not R) and S and xor; S
// for R-S) is inverted first. Four full adder cells in a ripple chain produce
// the sum, the carries c3 and c4 and each bit's propagate p = r|s and
// generate g = r&s. A carry lookahead folds p and g into the slice's
// active-low propagate p_n and generate g_n, which a lookahead carry unit
// outside the slice uses to cascade slices. For arithmetic functions:
//   p_n  = not(P3 P2 P1 P0)
//   g_n  = not(G3 + P3 G2 + P3 P2 G1 + P3 P2 P1 G0)
//   cout = C4,  ovr = C3 xor C4
// For the logic functions the flags follow the AM2901 flag table (OR, AND,
// EXNOR rows and their operand-inverted variants). The result flags are
// zero (F == 0) and sign (F[3]). Purely combinational.
module am2901_alu
  import am2901_pkg::*;
(
  input  alu_fn_e    fn,     // function, I[5:3]
  input  word_t      r,      // R operand
  input  word_t      s,      // S operand
  input  logic       cin,    // Cn, carry into bit 0
  output word_t      f,      // result F
  output alu_flags_t flags,  // cout, zero, sign, ovr
  output logic       p_n,    // slice carry propagate, active low
  output logic       g_n     // slice carry generate, active low
);
  word_t           re, se;   // operands after the inversion the function asks for
  word_t           sum;
  word_t           p, g;
  logic [WIDTH:0]  c;        // c[0] = cin, c[i+1] = carry out of bit i

  always_comb begin
    re = (fn == FN_SUBR || fn == FN_NOTRS || fn == FN_EXOR) ? ~r : r;
    se = (fn == FN_SUBS) ? ~s : s;
  end

  assign c[0] = cin;
  for (genvar i = 0; i < WIDTH; i++) begin : g_cell
    am2901_full_adder u_fa (
      .r (re[i]), .s (se[i]), .ci(c[i]),
      .f (sum[i]), .co(c[i+1]), .p(p[i]), .g(g[i])
    );
  end

  // Lookahead terms of the slice
  logic pall, gla, gany, glx, x2, x3;
  always_comb begin
    pall = &p;
    gla  = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0]);
    gany = |g;
    // generate-like term of the exclusive-nor row: the last product uses P0
    glx  = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & p[0]);
  end

  always_comb begin
    // the two brackets of the exclusive-nor overflow equation
    x2 = ~p[2] | (~g[2] & ~p[1]) | (~g[2] & ~g[1] & ~p[0]) | (~g[2] & ~g[1] & ~g[0] & cin);
    x3 = ~p[3] | (~g[3] & ~p[2]) | (~g[3] & ~g[2] & ~p[1]) | (~g[3] & ~g[2] & ~g[1] & ~p[0])
       | (~g[3] & ~g[2] & ~g[1] & ~g[0] & cin);
  end

  // Lookahead outputs: functions of the operands only, never of cin
  always_comb begin
    unique case (fn)
      FN_OR:             begin p_n = 1'b0; g_n = pall;  end
      FN_AND, FN_NOTRS:  begin p_n = 1'b0; g_n = ~gany; end
      FN_EXOR, FN_EXNOR: begin p_n = gany; g_n = glx;   end
      default:           begin p_n = ~pall; g_n = ~gla; end  // arithmetic
    endcase
  end

  always_comb begin
    f          = sum;
    flags.cout = c[WIDTH];
    flags.ovr  = c[WIDTH] ^ c[WIDTH-1];
    unique case (fn)
      FN_ADD, FN_SUBR, FN_SUBS: ;  // as set above
      FN_OR: begin
        f          = p;            // r | s
        flags.cout = ~pall | cin;
        flags.ovr  = ~pall | cin;
      end
      FN_AND, FN_NOTRS: begin
        f          = g;            // r & s, or (not r) & s
        flags.cout = gany | cin;
        flags.ovr  = gany | cin;
      end
      FN_EXOR, FN_EXNOR: begin
        f          = ~(re ^ se);   // xnor of r and s, or xor once r is inverted
        flags.cout = ~(g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1])
                       | (p[3] & p[2] & p[1] & p[0] & (g[0] | ~cin)));
        flags.ovr  = x2 ^ x3;
      end
      default: ;
    endcase
    flags.zero = (f == '0);
    flags.sign = f[WIDTH-1];
  end
endmodule
