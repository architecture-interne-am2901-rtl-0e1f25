// tb_am2901_word: end-to-end test of the cascaded word (four slices, 16
// bits, lookahead carries), all parameters at their defaults.
//
// Random microinstructions run against a 16-bit behavioural model written
// from the source, function and destination tables: Y, F = 0, sign, the
// carry out, overflow and group propagate/generate of arithmetic
// functions, the end shift pins, and every few cycles the 16 registers and
// Q. Then a short program computes a 16-bit sum with carries crossing
// every slice boundary and a 16-bit shift through all slices. It counts
// carries entering each upper slice, overflows, down and up shifts, Y
// showing A and F = 0, and counts a failure for any that never happened.
module tb_am2901_word;
  localparam int W = 16;
  logic         clk = 1'b0, rst;
  logic [8:0]   i;
  logic [3:0]   a, b;
  logic [W-1:0] d, y;
  logic         cn, oe_n, y_oe, cn_4, ovr, f_zero, f_sign, p_n, g_n;
  logic         ram0_i, ram0_o, ram0_oe, ramn_i, ramn_o, ramn_oe;
  logic         q0_i, q0_o, q0_oe, qn_i, qn_o, qn_oe;
  int           checks = 0, failures = 0;

  am2901_word dut (
    .cp(clk), .rst(rst), .i(i), .a(a), .b(b), .d(d), .cn(cn), .oe_n(oe_n),
    .y(y), .y_oe(y_oe), .cn_4(cn_4), .ovr(ovr), .f_zero(f_zero), .f_sign(f_sign),
    .p_n(p_n), .g_n(g_n),
    .ram0_i(ram0_i), .ram0_o(ram0_o), .ram0_oe(ram0_oe),
    .ramn_i(ramn_i), .ramn_o(ramn_o), .ramn_oe(ramn_oe),
    .q0_i(q0_i), .q0_o(q0_o), .q0_oe(q0_oe),
    .qn_i(qn_i), .qn_o(qn_o), .qn_oe(qn_oe)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- 16-bit model ----------------
  logic [W-1:0] m_ram [16];
  logic [W-1:0] m_q;
  logic [W-1:0] m_f, m_y;
  logic         m_cout, m_ovr, m_pn, m_gn;
  logic [3:0]   m_carry_in;  // carry into bit 4k, k = 0..3

  task automatic model_comb(input logic [8:0] ii, input logic [3:0] aa, bb,
                            input logic [W-1:0] dd, input logic c);
    logic [W-1:0] rv, sv, rr, ss, av, bv;
    logic [W:0]   sum, c0sum;
    av = m_ram[aa]; bv = m_ram[bb];
    case (ii[2:0])
      0: begin rv = av; sv = m_q; end
      1: begin rv = av; sv = bv;  end
      2: begin rv = 0;  sv = m_q; end
      3: begin rv = 0;  sv = bv;  end
      4: begin rv = 0;  sv = av;  end
      5: begin rv = dd; sv = av;  end
      6: begin rv = dd; sv = m_q; end
      default: begin rv = dd; sv = 0; end
    endcase
    rr = (ii[5:3] == 1) ? ~rv : rv;
    ss = (ii[5:3] == 2) ? ~sv : sv;
    sum   = {1'b0, rr} + {1'b0, ss} + (W+1)'(c);
    c0sum = {1'b0, rr} + {1'b0, ss};
    m_cout = sum[W];
    // signed overflow: operands of equal sign, result of the other sign
    m_ovr  = (rr[W-1] == ss[W-1]) && (sum[W-1] != rr[W-1]);
    m_gn   = !c0sum[W];
    m_pn   = ((rr | ss) != '1);
    for (int k = 0; k < 4; k++) begin
      int lo = 1 << (4 * k);
      m_carry_in[k] = ((int'(rr) % lo + int'(ss) % lo + int'(c)) >= lo) || (k == 0 && c);
    end
    case (ii[5:3])
      0, 1, 2: m_f = sum[W-1:0];
      3:       m_f = rv | sv;
      4:       m_f = rv & sv;
      5:       m_f = ~rv & sv;
      6:       m_f = rv ^ sv;
      default: m_f = ~(rv ^ sv);
    endcase
    m_y = (ii[8:6] == 2) ? av : m_f;
  endtask

  task automatic model_clock(input logic [8:0] ii, input logic [3:0] bb,
                             input logic r0, rn, qq0, qn);
    case (ii[8:6])
      0: m_q = m_f;
      2, 3: m_ram[bb] = m_f;
      4: begin m_ram[bb] = {rn, m_f[W-1:1]}; m_q = {qn, m_q[W-1:1]}; end
      5: m_ram[bb] = {rn, m_f[W-1:1]};
      6: begin m_ram[bb] = {m_f[W-2:0], r0}; m_q = {m_q[W-2:0], qq0}; end
      7: m_ram[bb] = {m_f[W-2:0], r0};
      default: ;
    endcase
  endtask

  int n_slice_carry [4];
  int n_ovr, n_down, n_up, n_ysel_a, n_zero, n_prop, n_gen, n_cout;

  task automatic step_and_check(input int n);
    #1;
    model_comb(i, a, b, d, cn);
    checks++;
    if (y !== m_y || f_zero !== (m_f == 0) || f_sign !== m_f[W-1]
        || ram0_o !== m_f[0] || ramn_o !== m_f[W-1] || q0_o !== m_q[0] || qn_o !== m_q[W-1]
        || ram0_oe !== (i[8:7] == 2'b10) || ramn_oe !== (i[8:7] == 2'b11)
        || q0_oe !== (i[8:7] == 2'b10) || qn_oe !== (i[8:7] == 2'b11) || y_oe !== !oe_n) begin
      failures++;
      if (failures < 20) $display("FAIL n=%0d i=%o: y=%h exp %h", n, i, y, m_y);
    end
    if (i[5:3] <= 2) begin
      checks++;
      if (cn_4 !== m_cout || ovr !== m_ovr || p_n !== m_pn || g_n !== m_gn) begin
        failures++;
        if (failures < 20)
          $display("FAIL n=%0d i=%o flags c4=%b ovr=%b p_n=%b g_n=%b exp %b %b %b %b",
                   n, i, cn_4, ovr, p_n, g_n, m_cout, m_ovr, m_pn, m_gn);
      end
      for (int k = 1; k < 4; k++) if (m_carry_in[k]) n_slice_carry[k]++;
      if (m_ovr) n_ovr++;
      if (m_cout) n_cout++;
      if (!m_pn) n_prop++;
      if (!m_gn) n_gen++;
    end
    if (i[8:7] == 2'b10) n_down++;
    if (i[8:7] == 2'b11) n_up++;
    if (i[8:6] == 3'o2) n_ysel_a++;
    if (f_zero) n_zero++;
    @(negedge clk);
    model_clock(i, b, ram0_i, ramn_i, q0_i, qn_i);
  endtask

  task automatic check_state();
    for (int k = 0; k < 16; k++) begin
      i = {3'o1, 3'o3, 3'o4}; a = 4'(k); #1;   // ZA, OR, NOP: Y = A
      checks++;
      if (y !== m_ram[k]) begin
        failures++;
        if (failures < 20) $display("FAIL reg %0d = %h exp %h", k, y, m_ram[k]);
      end
    end
    i = {3'o1, 3'o3, 3'o2}; #1;                 // ZQ: Y = Q
    checks++;
    if (y !== m_q) begin failures++; $display("FAIL Q = %h exp %h", y, m_q); end
    @(negedge clk);
  endtask

  initial begin
    rst = 1'b1; i = '0; a = '0; b = '0; d = '0; cn = 0; oe_n = 0;
    ram0_i = 0; ramn_i = 0; q0_i = 0; qn_i = 0;
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    foreach (m_ram[k]) m_ram[k] = '0;
    m_q = '0;

    // ---- random microinstructions ----
    for (int n = 0; n < 20000; n++) begin
      i  = 9'($urandom);
      a  = 4'($urandom); b = 4'($urandom); d = W'($urandom);
      cn = 1'($urandom);
      oe_n   = ($urandom_range(0, 7) == 0);
      ram0_i = 1'($urandom); ramn_i = 1'($urandom);
      q0_i   = 1'($urandom); qn_i   = 1'($urandom);
      step_and_check(n);
      if (n % 16 == 15) check_state();
    end

    // ---- program: R1 = 16'h7FFF, R2 = 1; R3 = R1 + R2 (carry through all
    // slices, overflow); then R3 shifted up four times through Q ----
    oe_n = 0; cn = 0;
    i = {3'o3, 3'o3, 3'o7}; b = 4'd1; d = 16'h7FFF; step_and_check(-1);  // R1 <- D
    i = {3'o3, 3'o3, 3'o7}; b = 4'd2; d = 16'h0001; step_and_check(-2);  // R2 <- D
    i = {3'o3, 3'o0, 3'o1}; a = 4'd2; b = 4'd1;     step_and_check(-3);  // R1 <- R2 + R1
    checks++;
    if (!(m_ram[1] == 16'h8000 && n_ovr > 0)) begin
      failures++; $display("FAIL program sum %h", m_ram[1]);
    end
    for (int k = 0; k < 4; k++) begin
      i = {3'o7, 3'o3, 3'o3}; b = 4'd1; ram0_i = 1'b1;                     // R1 <- 2*R1 + 1
      step_and_check(-10 - k);
    end
    check_state();
    checks++;
    if (m_ram[1] != 16'h000F) begin failures++; $display("FAIL program shift %h", m_ram[1]); end

    // ---- every mechanism must have happened ----
    $display("carries into slices 1..3: %0d %0d %0d, carry out %0d, overflow %0d, down %0d, up %0d, Y=A %0d, F=0 %0d, propagate %0d, generate %0d",
             n_slice_carry[1], n_slice_carry[2], n_slice_carry[3], n_cout, n_ovr, n_down, n_up,
             n_ysel_a, n_zero, n_prop, n_gen);
    checks++;
    if (n_slice_carry[1] == 0 || n_slice_carry[2] == 0 || n_slice_carry[3] == 0 || n_cout == 0 ||
        n_ovr == 0 || n_down == 0 || n_up == 0 || n_ysel_a == 0 || n_zero == 0 ||
        n_prop == 0 || n_gen == 0) begin
      failures++; $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
