// am2901_src_mux: the ALU source operand selector of the AM2901.
//
// I[2:0] picks the pair (R, S) among the register file outputs A and B, the
// direct data input D, the Q register and zero, as in the source table:
//   AQ: A,Q  AB: A,B  ZQ: 0,Q  ZB: 0,B  ZA: 0,A  DA: D,A  DQ: D,Q  DZ: D,0
// R is thus chosen from {A, D, 0} and S from {A, B, Q, 0}. Purely
// combinational.
module am2901_src_mux
  import am2901_pkg::*;
(
  input  alu_src_e src,  // I[2:0]
  input  word_t    a,    // register file port A
  input  word_t    b,    // register file port B
  input  word_t    d,    // direct data input
  input  word_t    q,    // Q register
  output word_t    r,    // R operand
  output word_t    s     // S operand
);
  always_comb begin
    unique case (src)
      SRC_AQ, SRC_AB:         r = a;
      SRC_ZQ, SRC_ZB, SRC_ZA: r = '0;
      default:                r = d;   // DA, DQ, DZ
    endcase
    unique case (src)
      SRC_AQ, SRC_ZQ, SRC_DQ: s = q;
      SRC_AB, SRC_ZB:         s = b;
      SRC_ZA, SRC_DA:         s = a;
      default:                s = '0;  // DZ
    endcase
  end
endmodule
