// am2901_full_adder: one-bit adder cell of the AM2901 ALU.
//
// Adds r, s and the incoming carry ci. Besides the sum f and the carry out co
// it gives the cell's propagate p = r | s and generate g = r & s, which the
// carry lookahead of the ALU combines. The carry out is written in terms of
// them: co = g | (p & ci). Purely combinational.
module am2901_full_adder (
  input  logic r,   // first operand bit
  input  logic s,   // second operand bit
  input  logic ci,  // carry from the lower bit
  output logic f,   // sum bit
  output logic co,  // carry to the upper bit
  output logic p,   // propagate: a carry coming in goes out
  output logic g    // generate: a carry goes out whatever comes in
);
  assign p  = r | s;
  assign g  = r & s;
  assign f  = r ^ s ^ ci;
  assign co = g | (p & ci);
endmodule
