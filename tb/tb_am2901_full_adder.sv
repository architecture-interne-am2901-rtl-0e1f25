// tb_am2901_full_adder: exhaustive check of the one-bit adder cell.
// All eight input combinations are compared with the adder truth table
// (sum and carry) and with the propagate/generate definitions p = r|s,
// g = r&s.
module tb_am2901_full_adder;
  logic clk = 1'b0;
  logic r, s, ci, f, co, p, g;
  int   checks = 0, failures = 0;

  am2901_full_adder dut (.r(r), .s(s), .ci(ci), .f(f), .co(co), .p(p), .g(g));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // truth table rows {cin, r, s} -> {carry, sum}
  localparam logic [1:0] TT [8] = '{2'b00, 2'b01, 2'b01, 2'b10, 2'b01, 2'b10, 2'b10, 2'b11};

  initial begin
    for (int k = 0; k < 8; k++) begin
      {ci, r, s} = 3'(k);
      @(posedge clk);
      checks++;
      if ({co, f} !== TT[k] || p !== (r | s) || g !== (r & s)) begin
        failures++;
        $display("FAIL cin=%b r=%b s=%b: co=%b f=%b p=%b g=%b", ci, r, s, co, f, p, g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
