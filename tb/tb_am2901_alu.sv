// tb_am2901_alu: exhaustive check of the ALU, 8 functions x 256 operand
// pairs x 2 carries. Results and arithmetic flags come from integer
// arithmetic: the sum of the (possibly inverted) operands plus cin, carry
// bit 4, overflow as a sign error of the signed sum, slice generate as the
// carry out with cin = 0, slice propagate as all bits propagating. Flags of
// the logic functions come from the AM2901 flag table, evaluated here with
// loops over the bits rather than the unrolled equations of the RTL.
module tb_am2901_alu;
  import am2901_pkg::*;
  logic       clk = 1'b0;
  alu_fn_e    fn;
  word_t      r, s, f;
  logic       cin;
  alu_flags_t fl;
  logic       p_n, g_n;
  int         checks = 0, failures = 0;

  am2901_alu dut (.fn(fn), .r(r), .s(s), .cin(cin), .f(f), .flags(fl), .p_n(p_n), .g_n(g_n));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected flags, with the lookahead outputs appended: {cout, zero, sign, ovr, p_n, g_n}
  typedef struct packed { logic cout, zero, sign, ovr, p_n, g_n; } exp_t;

  function automatic exp_t ref_flags(input alu_fn_e fn_i, input word_t r_i, input word_t s_i,
                                     input logic c_i, output word_t f_o);
    exp_t o;
    word_t ro, so, pp, gg;
    int sum, sr, ss, ssum;
    logic allp, anyg, ex2, ex3, t;
    ro = (fn_i inside {FN_SUBR, FN_NOTRS, FN_EXOR}) ? ~r_i : r_i;
    so = (fn_i == FN_SUBS) ? ~s_i : s_i;
    pp = ro | so;
    gg = ro & so;
    allp = (pp == 4'hF);
    anyg = (gg != 0);
    sum  = int'(ro) + int'(so) + int'(c_i);
    sr   = (ro[3]) ? int'(ro) - 16 : int'(ro);
    ss   = (so[3]) ? int'(so) - 16 : int'(so);
    ssum = sr + ss + int'(c_i);
    o = '0;
    case (fn_i)
      FN_ADD, FN_SUBR, FN_SUBS: begin
        f_o    = word_t'(sum);
        o.cout = (sum >= 16);
        o.ovr  = (ssum > 7) || (ssum < -8);
        o.g_n  = !((int'(ro) + int'(so)) >= 16);
        o.p_n  = !allp;
      end
      FN_OR: begin
        f_o = r_i | s_i;
        o.p_n = 0; o.g_n = allp; o.cout = !allp || c_i; o.ovr = o.cout;
      end
      FN_AND, FN_NOTRS: begin
        f_o = (fn_i == FN_AND) ? (r_i & s_i) : (~r_i & s_i);
        o.p_n = 0; o.g_n = !anyg; o.cout = anyg || c_i; o.ovr = o.cout;
      end
      default: begin // EXOR, EXNOR
        f_o = (fn_i == FN_EXOR) ? (r_i ^ s_i) : ~(r_i ^ s_i);
        o.p_n = anyg;
        // G3 + P3G2 + P3P2G1 + P3P2P1P0
        t = pp[3] & pp[2] & pp[1] & pp[0];
        for (int k = 1; k <= 3; k++) begin
          logic term = gg[k];
          for (int m = k + 1; m <= 3; m++) term &= pp[m];
          t |= term;
        end
        o.g_n = t;
        t = pp[3] & pp[2] & pp[1] & pp[0] & (gg[0] | !c_i);
        for (int k = 1; k <= 3; k++) begin
          logic term = gg[k];
          for (int m = k + 1; m <= 3; m++) term &= pp[m];
          t |= term;
        end
        o.cout = !t;
        for (int top = 2; top <= 3; top++) begin
          logic acc = !pp[top];
          for (int j = top - 1; j >= 0; j--) begin
            logic term = !pp[j];
            for (int m = j + 1; m <= top; m++) term &= !gg[m];
            acc |= term;
          end
          begin
            logic term = c_i;
            for (int m = 0; m <= top; m++) term &= !gg[m];
            acc |= term;
          end
          if (top == 2) ex2 = acc; else ex3 = acc;
        end
        o.ovr = ex2 ^ ex3;
      end
    endcase
    o.zero = (f_o == 0);
    o.sign = f_o[3];
    return o;
  endfunction

  initial begin
    word_t      ef;
    exp_t       efl;
    for (int k = 0; k < 8 * 256 * 2; k++) begin
      fn  = alu_fn_e'(k[11:9]);
      r   = k[8:5];
      s   = k[4:1];
      cin = k[0];
      #1;
      efl = ref_flags(fn, r, s, cin, ef);
      checks++;
      if (f !== ef || {fl, p_n, g_n} !== efl) begin
        failures++;
        if (failures < 20)
          $display("FAIL fn=%0d r=%h s=%h cin=%b: f=%h exp %h flags=%b exp %b",
                   fn, r, s, cin, f, ef, {fl, p_n, g_n}, efl);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
