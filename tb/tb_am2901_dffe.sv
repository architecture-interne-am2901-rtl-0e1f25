// tb_am2901_dffe: random writes with random enables into an enabled D
// register, checked after every rising edge against a stored copy; also
// checks that the output does not move between edges and that reset clears.
module tb_am2901_dffe;
  logic       clk = 1'b0, rst, wen;
  logic [3:0] d, q, model;
  int         checks = 0, failures = 0;

  am2901_dffe #(.WIDTH(4)) dut (.ck(clk), .rst(rst), .wen(wen), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; wen = 1'b0; d = '0;
    @(negedge clk);
    rst = 1'b0;
    model = '0;
    checks++;
    if (q !== 4'h0) begin failures++; $display("FAIL reset: q=%h", q); end
    for (int n = 0; n < 1000; n++) begin
      wen = 1'($urandom);
      d   = 4'($urandom);
      #2;  // inputs change between edges: no effect until the edge
      checks++;
      if (q !== model) begin failures++; $display("FAIL before edge: q=%h exp %h", q, model); end
      @(negedge clk);
      if (wen) model = d;
      checks++;
      if (q !== model) begin failures++; $display("FAIL n=%0d: q=%h exp %h", n, q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
