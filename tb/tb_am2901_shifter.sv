// tb_am2901_shifter: exhaustive check of the bit shifter: every word, every
// pair of entering bits, the three operations. The expected word comes from
// integer multiply/divide by two with the entering bit added.
module tb_am2901_shifter;
  import am2901_pkg::*;
  logic   clk = 1'b0;
  shift_e op;
  word_t  d, y, ey;
  logic   in_hi, in_lo, out_lo, out_hi;
  int     checks = 0, failures = 0;

  am2901_shifter dut (.op(op), .d(d), .in_hi(in_hi), .in_lo(in_lo),
                      .y(y), .out_lo(out_lo), .out_hi(out_hi));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 3; o++)
      for (int k = 0; k < 64; k++) begin
        op = shift_e'(o);
        d  = k[5:2];
        in_hi = k[1];
        in_lo = k[0];
        #1;
        case (o)
          1:       ey = word_t'(int'(d) / 2 + 8 * int'(in_hi));
          2:       ey = word_t'((int'(d) * 2) % 16 + int'(in_lo));
          default: ey = d;
        endcase
        checks++;
        if (y !== ey || out_lo !== (int'(d) % 2 == 1) || out_hi !== (int'(d) >= 8)) begin
          failures++;
          $display("FAIL op=%0d d=%h hi=%b lo=%b: y=%h exp %h", o, d, in_hi, in_lo, y, ey);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
