// am2901_regfile: the general register file of the AM2901, 16 words of 4 bits.
//
// Two read ports and one conditional write port. A decoder turns the write
// address b into one enable per word; each word is an enabled D register
// (am2901_dffe), so a word not addressed keeps its value through the feedback
// multiplexer and the clock is never gated. The two read ports are
// multiplexers on a and b, combinational: a_q and b_q follow the addresses
// in the same cycle. A write of d at address b takes effect on the rising
// edge of ck when we is high; reads in that cycle still see the old word.
// The original part latches A and B while the clock is high; here the
// registers are edge-triggered and read asynchronously, which gives the same
// result for the read-modify-write of one microinstruction per cycle.
module am2901_regfile
  import am2901_pkg::*;
#(
  parameter int unsigned N_WORDS = NREGS,  // number of words
  parameter int unsigned W       = WIDTH   // bits per word
) (
  input  logic                       ck,    // clock
  input  logic                       rst,   // synchronous reset, clears all words
  input  logic [$clog2(N_WORDS)-1:0] a,     // read address, port A
  input  logic [$clog2(N_WORDS)-1:0] b,     // read address of port B and write address
  input  logic                       we,    // write enable
  input  logic [W-1:0]               d,     // data written
  output logic [W-1:0]               a_q,   // word at a
  output logic [W-1:0]               b_q    // word at b
);
  logic [N_WORDS-1:0] sel;                 // decoded write enables
  logic [W-1:0]       mem [N_WORDS];

  always_comb begin
    sel    = '0;
    sel[b] = we;
  end

  for (genvar k = 0; k < N_WORDS; k++) begin : g_word
    am2901_dffe #(.WIDTH(W)) u_word (
      .ck(ck), .rst(rst), .wen(sel[k]), .d(d), .q(mem[k])
    );
  end

  always_comb begin
    a_q = mem[a];
    b_q = mem[b];
  end
endmodule
