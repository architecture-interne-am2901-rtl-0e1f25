// tb_am2901_cla: exhaustive check of the 4-slice carry lookahead unit.
// Every combination of slice propagates, generates and carry in (512) is
// compared with a slice-by-slice ripple: carry = G + P . previous carry.
// The group generate is the ripple's carry out with a zero carry in, the
// group propagate is all slices propagating.
module tb_am2901_cla;
  logic       clk = 1'b0;
  logic [3:0] p_n, g_n, c, ec;
  logic       cin, gp_n, gg_n;
  int         checks = 0, failures = 0;

  am2901_cla #(.NSLICES(4)) dut (.p_n(p_n), .g_n(g_n), .cin(cin), .c(c), .gp_n(gp_n), .gg_n(gg_n));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 512; k++) begin
      logic carry, c0;
      {p_n, g_n, cin} = 9'(k);
      carry = cin;
      c0    = 1'b0;
      for (int j = 0; j < 4; j++) begin
        carry = !g_n[j] || (!p_n[j] && carry);
        c0    = !g_n[j] || (!p_n[j] && c0);
        ec[j] = carry;
      end
      #1;
      checks++;
      if (c !== ec || gp_n !== (p_n != 4'b0000) || gg_n !== !c0) begin
        failures++;
        $display("FAIL p_n=%b g_n=%b cin=%b: c=%b exp %b gp_n=%b gg_n=%b", p_n, g_n, cin, c, ec, gp_n, gg_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
