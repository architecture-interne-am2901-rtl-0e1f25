// tb_am2901: end-to-end test of one AM2901 slice at its default size.
//
// Part 1 runs the arithmetic instruction table of the AM2901: 24 source and
// function combinations, each with Cn = 0 and Cn = 1, whose Y result must be
// the listed expression of A, B, D and Q (A+Q, Q-1, -B-1, D-A, ...).
// Part 2 runs random microinstructions (every source, function and
// destination, random addresses, data, carry and shift-pin inputs) and
// compares Y, F = 0, F3, the arithmetic flags, the shift-pin outputs and
// their enables, and afterwards the whole register file and Q, with a
// behavioural model of the slice written from the source, function and
// destination tables. It counts how often each mechanism occurred (each
// destination, shifts down and up, Y showing A, carry out, overflow,
// F = 0, propagate, generate, the 3-state output disabled) and counts a
// failure for any that never did.
module tb_am2901;
  import am2901_pkg::*;
  logic       clk = 1'b0, rst;
  logic [8:0] i;
  logic [3:0] a, b, d, y;
  logic       cn, oe_n, y_oe, cn_4, p_n, g_n, ovr, f_zero, f3;
  logic       ram0_i, ram0_o, ram0_oe, ram3_i, ram3_o, ram3_oe;
  logic       q0_i, q0_o, q0_oe, q3_i, q3_o, q3_oe;
  int         checks = 0, failures = 0;

  am2901 dut (
    .cp(clk), .rst(rst), .i(i), .a(a), .b(b), .d(d), .cn(cn), .oe_n(oe_n),
    .y(y), .y_oe(y_oe), .cn_4(cn_4), .p_n(p_n), .g_n(g_n), .ovr(ovr),
    .f_zero(f_zero), .f3(f3),
    .ram0_i(ram0_i), .ram0_o(ram0_o), .ram0_oe(ram0_oe),
    .ram3_i(ram3_i), .ram3_o(ram3_o), .ram3_oe(ram3_oe),
    .q0_i(q0_i), .q0_o(q0_o), .q0_oe(q0_oe),
    .q3_i(q3_i), .q3_o(q3_o), .q3_oe(q3_oe)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- behavioural model of the slice ----------------
  logic [3:0] m_ram [16];
  logic [3:0] m_q;

  typedef struct {
    logic [3:0] y, f;
    logic       cout, ovr, p_n, g_n;
    logic       ram0_oe, ram3_oe, q0_oe, q3_oe;
  } obs_t;

  function automatic obs_t model_comb(input logic [8:0] ii, input logic [3:0] aa, bb, dd,
                                      input logic c);
    obs_t o;
    int   rv, sv, rr, ss, sum, sr, s2, av, bv;
    av = int'(m_ram[aa]);
    bv = int'(m_ram[bb]);
    case (ii[2:0])
      0: begin rv = av;      sv = int'(m_q); end
      1: begin rv = av;      sv = bv;        end
      2: begin rv = 0;       sv = int'(m_q); end
      3: begin rv = 0;       sv = bv;        end
      4: begin rv = 0;       sv = av;        end
      5: begin rv = int'(dd); sv = av;       end
      6: begin rv = int'(dd); sv = int'(m_q); end
      default: begin rv = int'(dd); sv = 0; end
    endcase
    rr = rv; ss = sv;
    if (ii[5:3] == 1) rr = 15 - rv;   // S - R
    if (ii[5:3] == 2) ss = 15 - sv;   // R - S
    sum = rr + ss + int'(c);
    sr  = (rr >= 8) ? rr - 16 : rr;
    s2  = (ss >= 8) ? ss - 16 : ss;
    o.cout = (sum >= 16);
    o.ovr  = (sr + s2 + int'(c) > 7) || (sr + s2 + int'(c) < -8);
    o.g_n  = !(rr + ss >= 16);
    o.p_n  = ((4'(rr) | 4'(ss)) != 4'hF);
    case (ii[5:3])
      0, 1, 2: o.f = 4'(sum);
      3:       o.f = 4'(rv) | 4'(sv);
      4:       o.f = 4'(rv) & 4'(sv);
      5:       o.f = ~4'(rv) & 4'(sv);
      6:       o.f = 4'(rv) ^ 4'(sv);
      default: o.f = ~(4'(rv) ^ 4'(sv));
    endcase
    o.y       = (ii[8:6] == 2) ? 4'(av) : o.f;
    o.ram0_oe = (ii[8:6] == 4 || ii[8:6] == 5);
    o.q0_oe   = o.ram0_oe;
    o.ram3_oe = (ii[8:6] >= 6);
    o.q3_oe   = o.ram3_oe;
    return o;
  endfunction

  task automatic model_clock(input logic [8:0] ii, input logic [3:0] bb, input obs_t o,
                             input logic r0, r3, qq0, qq3);
    case (ii[8:6])
      0: m_q = o.f;
      2, 3: m_ram[bb] = o.f;
      4: begin m_ram[bb] = {r3, o.f[3:1]}; m_q = {qq3, m_q[3:1]}; end
      5: m_ram[bb] = {r3, o.f[3:1]};
      6: begin m_ram[bb] = {o.f[2:0], r0}; m_q = {m_q[2:0], qq0}; end
      7: m_ram[bb] = {o.f[2:0], r0};
      default: ;
    endcase
  endtask

  // ---------------- helpers ----------------
  // load register k with value v through D: DZ source, OR with 0, RAMF
  task automatic load_reg(input int k, input logic [3:0] v);
    i = {3'o3, 3'o3, 3'o7}; b = 4'(k); d = v; cn = 0;
    @(negedge clk);
    m_ram[k] = v;
  endtask

  task automatic load_q(input logic [3:0] v);
    i = {3'o0, 3'o3, 3'o7}; d = v; cn = 0;
    @(negedge clk);
    m_q = v;
  endtask

  // counters of the mechanisms
  int n_dest [8];
  int n_down, n_up, n_ysel_a, n_cout, n_ovr, n_zero, n_prop, n_gen, n_hiz, n_fn[8], n_src[8];

  // Instruction table rows: function, source, coefficients of A, B, D, Q,
  // constant, for Cn = 0. With Cn = 1 the result is one more.
  typedef struct { int fn, src, ca, cb, cd, cq, k; } row_t;
  localparam int NROWS = 24;
  row_t rows [NROWS] = '{
    '{0,0, 1,0,0,1, 0}, '{0,1, 1,1,0,0, 0}, '{0,5, 1,0,1,0, 0}, '{0,6, 0,0,1,1, 0},
    '{0,2, 0,0,0,1, 0}, '{0,3, 0,1,0,0, 0}, '{0,4, 1,0,0,0, 0}, '{0,7, 0,0,1,0, 0},
    '{1,2, 0,0,0,1,-1}, '{1,3, 0,1,0,0,-1}, '{1,4, 1,0,0,0,-1}, '{2,7, 0,0,1,0,-1},
    '{2,2, 0,0,0,-1,-1},'{2,3, 0,-1,0,0,-1},'{2,4, -1,0,0,0,-1},'{1,7, 0,0,-1,0,-1},
    '{1,0, -1,0,0,1,-1},'{1,1, -1,1,0,0,-1},'{1,5, 1,0,-1,0,-1},'{1,6, 0,0,-1,1,-1},
    '{2,0, 1,0,0,-1,-1},'{2,1, 1,-1,0,0,-1},'{2,5, -1,0,1,0,-1},'{2,6, 0,0,1,-1,-1}
  };

  initial begin
    obs_t o;
    rst = 1'b1; i = '0; a = '0; b = '0; d = '0; cn = 0; oe_n = 0;
    ram0_i = 0; ram3_i = 0; q0_i = 0; q3_i = 0;
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    foreach (m_ram[k]) m_ram[k] = '0;
    m_q = '0;

    // ---- part 1: the instruction table ----
    for (int t = 0; t < 20; t++) begin
      logic [3:0] va, vb, vd, vq;
      va = 4'($urandom); vb = 4'($urandom); vd = 4'($urandom); vq = 4'($urandom);
      load_reg(3, va);
      load_reg(9, vb);
      load_q(vq);
      for (int k = 0; k < NROWS; k++)
        for (int c = 0; c < 2; c++) begin
          int expv;
          i  = {3'o1, 3'(rows[k].fn), 3'(rows[k].src)};  // NOP destination
          a  = 4'd3; b = 4'd9; d = vd; cn = 1'(c);
          #1;
          expv = rows[k].ca * int'(va) + rows[k].cb * int'(vb) + rows[k].cd * int'(vd)
               + rows[k].cq * int'(vq) + rows[k].k + c;
          checks++;
          if (y !== 4'(expv)) begin
            failures++;
            $display("FAIL table row %0d%0d cn=%0d A=%h B=%h D=%h Q=%h: Y=%h exp %h",
                     rows[k].fn, rows[k].src, c, va, vb, vd, vq, y, 4'(expv));
          end
          @(negedge clk);
        end
    end

    // ---- part 2: random microinstructions against the model ----
    for (int n = 0; n < 20000; n++) begin
      i  = 9'($urandom);
      a  = 4'($urandom); b = 4'($urandom); d = 4'($urandom);
      cn = 1'($urandom);
      oe_n   = ($urandom_range(0, 7) == 0);
      ram0_i = 1'($urandom); ram3_i = 1'($urandom);
      q0_i   = 1'($urandom); q3_i   = 1'($urandom);
      #1;
      o = model_comb(i, a, b, d, cn);
      checks++;
      if (y !== o.y || f_zero !== (o.f == 0) || f3 !== o.f[3] || y_oe !== !oe_n
          || ram0_oe !== o.ram0_oe || ram3_oe !== o.ram3_oe
          || q0_oe !== o.q0_oe || q3_oe !== o.q3_oe
          || ram0_o !== o.f[0] || ram3_o !== o.f[3] || q0_o !== m_q[0] || q3_o !== m_q[3]) begin
        failures++;
        if (failures < 20) $display("FAIL n=%0d i=%o: y=%h exp %h", n, i, y, o.y);
      end
      if (i[5:3] <= 2) begin
        checks++;
        if (cn_4 !== o.cout || ovr !== o.ovr || g_n !== o.g_n || p_n !== o.p_n) begin
          failures++;
          if (failures < 20)
            $display("FAIL n=%0d i=%o flags: c4=%b ovr=%b g_n=%b p_n=%b exp %b %b %b %b",
                     n, i, cn_4, ovr, g_n, p_n, o.cout, o.ovr, o.g_n, o.p_n);
        end
        if (cn_4) n_cout++;
        if (ovr) n_ovr++;
        if (!p_n) n_prop++;
        if (!g_n) n_gen++;
      end
      n_dest[i[8:6]]++;
      n_fn[i[5:3]]++;
      n_src[i[2:0]]++;
      if (i[8:7] == 2'b10) n_down++;
      if (i[8:7] == 2'b11) n_up++;
      if (i[8:6] == 3'o2) n_ysel_a++;
      if (f_zero) n_zero++;
      if (!y_oe) n_hiz++;
      @(negedge clk);
      model_clock(i, b, o, ram0_i, ram3_i, q0_i, q3_i);
      // stored state, seen through the source mux: A and Q via source AQ, OR
      if (n % 8 == 7) begin
        for (int k = 0; k < 16; k++) begin
          i = {3'o1, 3'o3, 3'o4}; a = 4'(k); #1;       // ZA, OR: Y = A
          checks++;
          if (y !== m_ram[k]) begin
            failures++;
            if (failures < 20) $display("FAIL reg %0d = %h exp %h", k, y, m_ram[k]);
          end
        end
        i = {3'o1, 3'o3, 3'o2}; #1;                      // ZQ, OR: Y = Q
        checks++;
        if (y !== m_q) begin failures++; $display("FAIL Q = %h exp %h", y, m_q); end
        @(negedge clk);
      end
    end

    // ---- every mechanism must have happened ----
    for (int k = 0; k < 8; k++) begin
      checks += 3;
      if (n_dest[k] == 0 || n_fn[k] == 0 || n_src[k] == 0) begin
        failures++; $display("FAIL code %0d never used", k);
      end
    end
    $display("shift down %0d, shift up %0d, Y=A %0d, carry out %0d, overflow %0d, F=0 %0d, propagate %0d, generate %0d, Y disabled %0d",
             n_down, n_up, n_ysel_a, n_cout, n_ovr, n_zero, n_prop, n_gen, n_hiz);
    checks++;
    if (n_down == 0 || n_up == 0 || n_ysel_a == 0 || n_cout == 0 || n_ovr == 0 ||
        n_zero == 0 || n_prop == 0 || n_gen == 0 || n_hiz == 0) begin
      failures++; $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
