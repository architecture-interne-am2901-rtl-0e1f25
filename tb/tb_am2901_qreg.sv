// tb_am2901_qreg: random hold, load, shift-down and shift-up operations on
// the Q register, checked against a model after every edge, together with
// the bits leaving on the Q0 and Q3 sides.
module tb_am2901_qreg;
  import am2901_pkg::*;
  logic   clk = 1'b0, rst, we, q3_in, q0_in, q0_out, q3_out;
  shift_e op;
  word_t  f, q, model;
  int     checks = 0, failures = 0;

  am2901_qreg dut (.ck(clk), .rst(rst), .we(we), .op(op), .f(f),
                   .q3_in(q3_in), .q0_in(q0_in), .q(q), .q0_out(q0_out), .q3_out(q3_out));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; we = 1'b0; op = SH_NONE; f = '0; q3_in = 0; q0_in = 0;
    @(negedge clk);
    rst = 1'b0;
    model = '0;
    for (int n = 0; n < 3000; n++) begin
      we    = ($urandom_range(0, 3) != 0);
      op    = shift_e'($urandom_range(0, 2));
      f     = 4'($urandom);
      q3_in = 1'($urandom);
      q0_in = 1'($urandom);
      #1;
      checks++;
      if (q0_out !== model[0] || q3_out !== model[3]) begin
        failures++;
        $display("FAIL n=%0d: q0_out=%b q3_out=%b q=%h", n, q0_out, q3_out, model);
      end
      @(negedge clk);
      if (we)
        case (op)
          SH_DOWN: model = {q3_in, model[3:1]};
          SH_UP:   model = {model[2:0], q0_in};
          default: model = f;
        endcase
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL n=%0d: q=%h exp %h", n, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
