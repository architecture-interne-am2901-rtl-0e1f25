// am2901: one 4-bit slice of the AM2901 bit-slice processor.
//
// Each clock cycle executes one 9-bit microinstruction I:
//   I[2:0] source:      which of A, B, D, Q and 0 feed the ALU as R and S
//   I[5:3] function:    R+S, S-R, R-S, or, and, (not R) and S, xor, xnor
//   I[8:6] destination: where F is stored (register B, Q), how it is
//                       shifted on the way, and whether Y shows F or A
// Registers A and B of the 16-word register file are read combinationally at
// addresses a and b; the ALU result F (possibly shifted up or down by the RAM
// shifter) is written back to register b, and/or Q is loaded or shifted, on
// the rising edge of cp. Y, the status flags and the shift-pin outputs are
// combinational functions of the current inputs and stored state.
//
// Slices are cascaded into wider words by chaining cn_4 to the next slice's
// cn (ripple) or by feeding p_n/g_n to a lookahead carry unit, and by wiring
// ram3/q3 of one slice to ram0/q0 of the next. The bidirectional pins of the
// part (RAM0, RAM3, Q0, Q3) and its 3-state Y output are brought out here as
// separate in, out and output-enable signals so that the slice needs no
// 3-state logic; the board-level buffers are left to the user. A synchronous
// reset clearing the registers is this design's addition.
module am2901
  import am2901_pkg::*;
(
  input  logic       cp,       // clock
  input  logic       rst,      // synchronous reset of registers and Q
  input  logic [8:0] i,        // microinstruction
  input  logic [AW-1:0] a,       // register address A (read)
  input  logic [AW-1:0] b,       // register address B (read and write)
  input  logic [3:0] d,        // direct data input
  input  logic       cn,       // carry in
  input  logic       oe_n,     // output enable of Y, active low
  output logic [3:0] y,        // data output (valid when y_oe)
  output logic       y_oe,     // Y is driven
  output logic       cn_4,     // carry out Cn+4
  output logic       p_n,      // carry propagate, active low
  output logic       g_n,      // carry generate, active low
  output logic       ovr,      // overflow
  output logic       f_zero,   // F == 0
  output logic       f3,       // sign, F[3]
  input  logic       ram0_i,   // RAM0 pin as input (up shift)
  output logic       ram0_o,   // RAM0 pin as output (down shift): F[0]
  output logic       ram0_oe,  // RAM0 pin drives out
  input  logic       ram3_i,   // RAM3 pin as input (down shift)
  output logic       ram3_o,   // RAM3 pin as output (up shift): F[3]
  output logic       ram3_oe,  // RAM3 pin drives out
  input  logic       q0_i,     // Q0 pin as input (up shift)
  output logic       q0_o,     // Q0 pin as output (down shift): Q[0]
  output logic       q0_oe,    // Q0 pin drives out
  input  logic       q3_i,     // Q3 pin as input (down shift)
  output logic       q3_o,     // Q3 pin as output (up shift): Q[3]
  output logic       q3_oe     // Q3 pin drives out
);
  dest_ctrl_t ctrl;
  alu_flags_t flags;
  word_t      a_q, b_q, q, r, s, f, ram_d;

  am2901_dest_decode u_dec (.dest(dest_e'(i[8:6])), .ctrl(ctrl));

  am2901_src_mux u_src (
    .src(alu_src_e'(i[2:0])), .a(a_q), .b(b_q), .d(d), .q(q), .r(r), .s(s)
  );

  am2901_alu u_alu (
    .fn(alu_fn_e'(i[5:3])), .r(r), .s(s), .cin(cn), .f(f), .flags(flags),
    .p_n(p_n), .g_n(g_n)
  );

  am2901_shifter u_ram_sh (
    .op(ctrl.ram_shift), .d(f), .in_hi(ram3_i), .in_lo(ram0_i),
    .y(ram_d), .out_lo(ram0_o), .out_hi(ram3_o)
  );

  am2901_regfile u_ram (
    .ck(cp), .rst(rst), .a(a), .b(b), .we(ctrl.ram_we), .d(ram_d),
    .a_q(a_q), .b_q(b_q)
  );

  am2901_qreg u_q (
    .ck(cp), .rst(rst), .we(ctrl.q_we), .op(ctrl.q_shift), .f(f),
    .q3_in(q3_i), .q0_in(q0_i), .q(q), .q0_out(q0_o), .q3_out(q3_o)
  );

  always_comb begin
    y       = ctrl.y_sel_a ? a_q : f;
    y_oe    = ~oe_n;
    cn_4    = flags.cout;
    ovr     = flags.ovr;
    f_zero  = flags.zero;
    f3      = flags.sign;
    ram0_oe = ctrl.ram0_oe;
    ram3_oe = ctrl.ram3_oe;
    q0_oe   = ctrl.q0_oe;
    q3_oe   = ctrl.q3_oe;
  end
endmodule
