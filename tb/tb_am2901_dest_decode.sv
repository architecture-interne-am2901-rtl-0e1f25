// tb_am2901_dest_decode: checks the eight destination codes against the
// destination table: RAM write and shift, Q load and shift, Y source, and
// which of the RAM0, RAM3, Q0, Q3 pins drive out.
module tb_am2901_dest_decode;
  import am2901_pkg::*;
  logic       clk = 1'b0;
  dest_e      dest;
  dest_ctrl_t ctrl, exp_c;
  int         checks = 0, failures = 0;

  am2901_dest_decode dut (.dest(dest), .ctrl(ctrl));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 8; c++) begin
      dest = dest_e'(c);
      // expected row, written field by field
      exp_c = '0;
      exp_c.ram_we  = (c >= 2);
      exp_c.q_we    = (c == 0) || (c == 4) || (c == 6);
      exp_c.y_sel_a = (c == 2);
      if (c == 4 || c == 5) begin
        exp_c.ram_shift = SH_DOWN;
        exp_c.ram0_oe   = 1'b1;
        exp_c.q0_oe     = 1'b1;
      end
      if (c == 6 || c == 7) begin
        exp_c.ram_shift = SH_UP;
        exp_c.ram3_oe   = 1'b1;
        exp_c.q3_oe     = 1'b1;
      end
      if (c == 4) exp_c.q_shift = SH_DOWN;
      if (c == 6) exp_c.q_shift = SH_UP;
      @(posedge clk);
      checks++;
      if (ctrl !== exp_c) begin
        failures++;
        $display("FAIL dest=%0o: ctrl=%b exp %b", c, ctrl, exp_c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
