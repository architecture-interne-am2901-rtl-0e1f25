// am2901_shifter: the up/down bit shifter in front of the RAM and of Q.
//
// For SH_NONE the word passes unchanged. For SH_DOWN every bit moves one place
// towards bit 0, bit 3 takes in_hi (pin RAM3 or Q3 used as input) and bit 0
// leaves on out_lo. For SH_UP every bit moves towards bit 3, bit 0 takes in_lo
// (pin RAM0 or Q0) and bit 3 leaves on out_hi. The leaving bits are always
// given; whether a pin drives them out is decided by the destination decoder.
// Purely combinational.
module am2901_shifter
  import am2901_pkg::*;
(
  input  shift_e op,      // operation
  input  word_t  d,       // word to shift
  input  logic   in_hi,   // bit entering at the top on a down shift
  input  logic   in_lo,   // bit entering at the bottom on an up shift
  output word_t  y,       // shifted word
  output logic   out_lo,  // bit leaving at the bottom on a down shift (d[0])
  output logic   out_hi   // bit leaving at the top on an up shift (d[3])
);
  always_comb begin
    unique case (op)
      SH_DOWN: y = {in_hi, d[WIDTH-1:1]};
      SH_UP:   y = {d[WIDTH-2:0], in_lo};
      default: y = d;
    endcase
  end

  // the leaving bits depend on d only, never on the entering pins
  assign out_lo = d[0];
  assign out_hi = d[WIDTH-1];
endmodule
