// am2901_qreg: the Q register (accumulator) of the AM2901 with its shifter.
//
// A 4-bit enabled register whose input multiplexer chooses between the ALU
// result F and the register's own value passed through the Q shifter. With
// we high and op SH_NONE, Q takes F; with SH_DOWN it takes Q/2 with q3_in
// entering at bit 3; with SH_UP it takes 2Q with q0_in entering at bit 0;
// with we low it holds. q0_out and q3_out give the bits that leave on a down
// or an up shift (Q[0] and Q[3]). Updates on the rising edge of ck.
module am2901_qreg
  import am2901_pkg::*;
(
  input  logic   ck,      // clock
  input  logic   rst,     // synchronous reset, clears Q
  input  logic   we,      // load Q
  input  shift_e op,      // SH_NONE: load F; SH_DOWN / SH_UP: shift Q
  input  word_t  f,       // ALU result
  input  logic   q3_in,   // bit entering at the top on a down shift
  input  logic   q0_in,   // bit entering at the bottom on an up shift
  output word_t  q,       // register contents
  output logic   q0_out,  // Q[0], leaving on a down shift
  output logic   q3_out   // Q[3], leaving on an up shift
);
  word_t sh_q, nxt;

  am2901_shifter u_sh (
    .op(op), .d(q), .in_hi(q3_in), .in_lo(q0_in),
    .y(sh_q), .out_lo(q0_out), .out_hi(q3_out)
  );

  always_comb nxt = (op == SH_NONE) ? f : sh_q;

  am2901_dffe #(.WIDTH(WIDTH)) u_q (
    .ck(ck), .rst(rst), .wen(we), .d(nxt), .q(q)
  );
endmodule
