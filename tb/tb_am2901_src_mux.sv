// tb_am2901_src_mux: checks the eight source codes against the source table
// (AQ, AB, ZQ, ZB, ZA, DA, DQ, DZ) with random, distinct A, B, D and Q.
module tb_am2901_src_mux;
  import am2901_pkg::*;
  logic     clk = 1'b0;
  alu_src_e src;
  word_t    a, b, d, q, r, s;
  int       checks = 0, failures = 0;

  am2901_src_mux dut (.src(src), .a(a), .b(b), .d(d), .q(q), .r(r), .s(s));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // table letters: 0 = zero, 1 = A, 2 = B, 3 = D, 4 = Q
  localparam int R_OF [8] = '{1, 1, 0, 0, 0, 3, 3, 3};
  localparam int S_OF [8] = '{4, 2, 4, 2, 1, 1, 4, 0};

  function automatic word_t pick(input int sel);
    case (sel)
      1: return a;
      2: return b;
      3: return d;
      4: return q;
      default: return '0;
    endcase
  endfunction

  initial begin
    for (int n = 0; n < 200; n++) begin
      // four different non-zero values so that every wrong choice shows
      word_t v [4];
      int    base;
      base = $urandom_range(0, 15);
      for (int k = 0; k < 4; k++) v[k] = word_t'((base + 3 * k) % 15 + 1);
      {a, b, d, q} = {v[0], v[1], v[2], v[3]};
      for (int c = 0; c < 8; c++) begin
        src = alu_src_e'(c);
        @(posedge clk);
        checks++;
        if (r !== pick(R_OF[c]) || s !== pick(S_OF[c])) begin
          failures++;
          $display("FAIL src=%0d a=%h b=%h d=%h q=%h: r=%h s=%h", c, a, b, d, q, r, s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
