// am2901_cla: carry lookahead across cascaded AM2901 slices.
//
// Each slice reports an active-low propagate p_n and generate g_n. With
// P = not p_n and G = not g_n, the carry into slice k+1 is
//   C[k] = G[k] + P[k] G[k-1] + ... + P[k]..P[1] G[0] + P[k]..P[0] Cin,
// so that every slice receives its carry in one level of logic instead of
// waiting for the ripple through all lower slices. The unit also gives the
// group's own active-low propagate and generate, built by the same rule one
// level up, so that groups can be cascaded in turn. Purely combinational.
// The number of slices is this design's choice (4, a 16-bit word).
module am2901_cla #(
  parameter int unsigned NSLICES = 4
) (
  input  logic [NSLICES-1:0] p_n,   // slice propagates, active low
  input  logic [NSLICES-1:0] g_n,   // slice generates, active low
  input  logic               cin,   // carry into slice 0
  output logic [NSLICES-1:0] c,     // c[k]: carry out of slice k (into slice k+1)
  output logic               gp_n,  // group propagate, active low
  output logic               gg_n   // group generate, active low
);
  always_comb begin
    logic [NSLICES-1:0] pp, gg;
    logic               gen;
    pp = ~p_n;
    gg = ~g_n;
    for (int k = 0; k < NSLICES; k++) begin
      // sum of products: generate of slice j carried through slices j+1..k,
      // then the incoming carry through slices 0..k
      logic acc, term;
      acc = 1'b0;
      for (int j = 0; j <= k; j++) begin
        term = gg[j];
        for (int m = j + 1; m <= k; m++) term = term & pp[m];
        acc = acc | term;
      end
      term = cin;
      for (int m = 0; m <= k; m++) term = term & pp[m];
      c[k] = acc | term;
    end
    gen = 1'b0;
    for (int j = 0; j < NSLICES; j++) begin
      logic term;
      term = gg[j];
      for (int m = j + 1; m < NSLICES; m++) term = term & pp[m];
      gen = gen | term;
    end
    gp_n = ~(&pp);
    gg_n = ~gen;
  end
endmodule
