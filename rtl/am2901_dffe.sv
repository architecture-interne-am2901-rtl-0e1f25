// am2901_dffe: rising-edge D register with write enable.
//
// The enable selects, through a multiplexer in front of the flip-flop, between
// the new value d and the stored value q; the clock itself is never gated.
// An active-high synchronous reset clears the word (a choice of this design:
// the original part has no reset). q changes on the rising edge of ck only.
module am2901_dffe #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             ck,   // clock
  input  logic             rst,  // synchronous reset, active high
  input  logic             wen,  // write enable
  input  logic [WIDTH-1:0] d,    // new value
  output logic [WIDTH-1:0] q     // stored value
);
  logic [WIDTH-1:0] nxt;

  always_comb nxt = wen ? d : q;

  always_ff @(posedge ck) begin
    if (rst) q <= '0;
    else     q <= nxt;
  end
endmodule
