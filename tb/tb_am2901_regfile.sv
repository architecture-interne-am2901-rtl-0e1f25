// tb_am2901_regfile: random reads and conditional writes on the 16x4
// register file, compared with an array model. Every cycle both read ports
// are checked at random addresses; a write is seen only after the edge.
module tb_am2901_regfile;
  logic       clk = 1'b0, rst, we;
  logic [3:0] a, b, d, a_q, b_q;
  logic [3:0] model [16];
  int         checks = 0, failures = 0, writes = 0;

  am2901_regfile dut (.ck(clk), .rst(rst), .a(a), .b(b), .we(we), .d(d),
                      .a_q(a_q), .b_q(b_q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; we = 1'b0; a = '0; b = '0; d = '0;
    @(negedge clk);
    rst = 1'b0;
    foreach (model[k]) model[k] = '0;
    for (int n = 0; n < 4000; n++) begin
      a  = 4'($urandom);
      b  = 4'($urandom);
      d  = 4'($urandom);
      we = ($urandom_range(0, 2) != 0);
      #1;
      checks++;
      if (a_q !== model[a] || b_q !== model[b]) begin
        failures++;
        $display("FAIL n=%0d a=%h b=%h: a_q=%h exp %h, b_q=%h exp %h",
                 n, a, b, a_q, model[a], b_q, model[b]);
      end
      @(negedge clk);
      if (we) begin model[b] = d; writes++; end
    end
    checks++;
    if (writes == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
