// am2901_word: a data path of NSLICES AM2901 slices cascaded into one word.
//
// All slices receive the same microinstruction and register addresses and
// each handles four bits of D, Y and the registers, slice 0 the least
// significant. The shift pins are chained: on a down shift the RAM3 (Q3) pin
// of slice k reads the RAM0 (Q0) output of slice k+1, on an up shift the
// RAM0 (Q0) pin of slice k+1 reads the RAM3 (Q3) output of slice k; the pins
// at the two ends of the word are brought out. Carries either ripple from
// Cn+4 of one slice to Cn of the next (LOOKAHEAD = 0) or come from the
// lookahead unit am2901_cla fed by every slice's active-low propagate and
// generate (LOOKAHEAD = 1, the default). The word flags are taken as on a
// board: carry out and overflow from the most significant slice, sign from
// its F3, and F = 0 as the AND of all slices' F = 0 outputs (the wired-AND of
// the part's open-collector pins). Everything is combinational except the
// registers inside the slices, which update on the rising edge of cp.
// Word size and carry scheme defaults are this design's choices.
module am2901_word #(
  parameter int unsigned NSLICES   = 4,     // slices, 4 bits each
  parameter bit          LOOKAHEAD = 1'b1   // 1: lookahead carries, 0: ripple
) (
  input  logic                   cp,       // clock
  input  logic                   rst,      // synchronous reset of all registers
  input  logic [8:0]             i,        // microinstruction
  input  logic [3:0]             a,        // register address A
  input  logic [3:0]             b,        // register address B (read and write)
  input  logic [4*NSLICES-1:0]   d,        // direct data input
  input  logic                   cn,       // carry into the word
  input  logic                   oe_n,     // Y output enable, active low
  output logic [4*NSLICES-1:0]   y,        // data output
  output logic                   y_oe,     // Y is driven
  output logic                   cn_4,     // carry out of the word
  output logic                   ovr,      // overflow of the word
  output logic                   f_zero,   // F == 0 over the whole word
  output logic                   f_sign,   // most significant bit of F
  output logic                   p_n,      // group propagate, active low
  output logic                   g_n,      // group generate, active low
  input  logic                   ram0_i,   // RAM0 of slice 0, input (up shift)
  output logic                   ram0_o,   // RAM0 of slice 0, output (down shift)
  output logic                   ram0_oe,
  input  logic                   ramn_i,   // RAM3 of the top slice, input (down shift)
  output logic                   ramn_o,   // RAM3 of the top slice, output (up shift)
  output logic                   ramn_oe,
  input  logic                   q0_i,     // Q0 of slice 0, input
  output logic                   q0_o,     // Q0 of slice 0, output
  output logic                   q0_oe,
  input  logic                   qn_i,     // Q3 of the top slice, input
  output logic                   qn_o,     // Q3 of the top slice, output
  output logic                   qn_oe
);
  logic [NSLICES-1:0] s_cn, s_cn4, s_pn, s_gn, s_ovr, s_zero, s_f3, s_yoe;
  logic [NSLICES-1:0] r0_i, r0_o, r0_oe, r3_i, r3_o, r3_oe;
  logic [NSLICES-1:0] q0i, q0o, q0oe, q3i, q3o, q3oe;
  logic [NSLICES-1:0] la_c;
  logic               la_gp_n, la_gg_n;

  for (genvar k = 0; k < NSLICES; k++) begin : g_slice
    am2901 u_slice (
      .cp(cp), .rst(rst), .i(i), .a(a), .b(b), .d(d[4*k +: 4]), .cn(s_cn[k]), .oe_n(oe_n),
      .y(y[4*k +: 4]), .y_oe(s_yoe[k]), .cn_4(s_cn4[k]), .p_n(s_pn[k]), .g_n(s_gn[k]),
      .ovr(s_ovr[k]), .f_zero(s_zero[k]), .f3(s_f3[k]),
      .ram0_i(r0_i[k]), .ram0_o(r0_o[k]), .ram0_oe(r0_oe[k]),
      .ram3_i(r3_i[k]), .ram3_o(r3_o[k]), .ram3_oe(r3_oe[k]),
      .q0_i(q0i[k]), .q0_o(q0o[k]), .q0_oe(q0oe[k]),
      .q3_i(q3i[k]), .q3_o(q3o[k]), .q3_oe(q3oe[k])
    );
  end

  am2901_cla #(.NSLICES(NSLICES)) u_cla (
    .p_n(s_pn), .g_n(s_gn), .cin(cn), .c(la_c), .gp_n(la_gp_n), .gg_n(la_gg_n)
  );

  always_comb begin
    // carries
    s_cn[0] = cn;
    for (int k = 1; k < NSLICES; k++)
      s_cn[k] = LOOKAHEAD ? la_c[k-1] : s_cn4[k-1];
    // shift chains between neighbouring slices
    for (int k = 0; k < NSLICES; k++) begin
      r3_i[k] = (k == NSLICES - 1) ? ramn_i : r0_o[(k + 1) % NSLICES];
      r0_i[k] = (k == 0)           ? ram0_i : r3_o[(k + NSLICES - 1) % NSLICES];
      q3i[k]  = (k == NSLICES - 1) ? qn_i   : q0o[(k + 1) % NSLICES];
      q0i[k]  = (k == 0)           ? q0_i   : q3o[(k + NSLICES - 1) % NSLICES];
    end
    // word outputs
    y_oe    = s_yoe[0];
    cn_4    = s_cn4[NSLICES-1];
    ovr     = s_ovr[NSLICES-1];
    f_sign  = s_f3[NSLICES-1];
    f_zero  = &s_zero;
    p_n     = la_gp_n;
    g_n     = la_gg_n;
    ram0_o  = r0_o[0];
    ram0_oe = r0_oe[0];
    ramn_o  = r3_o[NSLICES-1];
    ramn_oe = r3_oe[NSLICES-1];
    q0_o    = q0o[0];
    q0_oe   = q0oe[0];
    qn_o    = q3o[NSLICES-1];
    qn_oe   = q3oe[NSLICES-1];
  end

  // All slices decode the same I and oe_n, so their pin directions agree;
  // the word takes them from the end slices.
  always_comb begin
    assert (s_yoe == {NSLICES{s_yoe[0]}});
    assert (r0_oe == {NSLICES{r0_oe[0]}});
    assert (q0oe  == {NSLICES{q0oe[0]}});
  end
endmodule
