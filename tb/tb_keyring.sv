// tb_keyring: checks the firing order of the KeyRing against the KeyRing
// protocol, for the two configurations of the processor (E=6,S=6,alpha=1 and
// E=3,S=6,alpha=2). A reference model counts the pulses of every unit; each
// pulse of unit (e,s) must find its two predecessors exactly as far ahead as
// the protocol demands, no stage may fire in two EUs at the same time, the
// row owner (sel) must be the unit that fires, and a held unit must stop the
// whole ring.
module tb_keyring;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  localparam int unsigned E0 = 6, S0 = 6, A0 = 1;
  localparam int unsigned E1 = 3, S1 = 6, A1 = 2;

  logic rst_n = 1'b1;
  logic [E0-1:0][S0-1:0] en0 = '0, clk0, key0;
  logic [S0-1:0][E0-1:0] sel0;
  logic [E1-1:0][S1-1:0] en1 = '0, clk1, key1;
  logic [S1-1:0][E1-1:0] sel1;

  keyring #(.E(E0), .S(S0), .ALPHA(A0)) dut0 (.rst_ni(rst_n), .en_i(en0), .clk_o(clk0), .key_o(key0), .sel_o(sel0));
  keyring #(.E(E1), .S(S1), .ALPHA(A1)) dut1 (.rst_ni(rst_n), .en_i(en1), .clk_o(clk1), .key_o(key1), .sel_o(sel1));

  // Reference: pulse counts of every unit, and the protocol's required lead.
  int cnt0 [E0][S0];
  int cnt1 [E1][S1];
  int total0 = 0, total1 = 0;

  // Global step number of the n-th pulse of (e,s): instruction i = e + E*n.
  function automatic int slot(int e, int s, int n, int E, int A);
    return s + A * (e + E * n);
  endfunction

  // Check one pulse of unit (e,s) whose count n_before the pulse is n.
  task automatic on_pulse(bit which, int e, int s);
    int E, S, A, n, ae, as_, be, bs, need_a, need_b, ca, cb;
    E = which ? E1 : E0;  S = which ? S1 : S0;  A = which ? A1 : A0;
    n = which ? cnt1[e][s] : cnt0[e][s];
    ae = e; as_ = (s + S - 1) % S;
    be = (e + E - 1) % E; bs = (s + A - 1) % S;
    // The predecessor's pulse for the same or earlier instruction must be done.
    need_a = (s == 0) ? n : n + 1;
    need_b = n + ((e != 0) ? 1 : 0) + ((s + A - 1 >= S) ? 1 : 0);
    ca = which ? cnt1[ae][as_] : cnt0[ae][as_];
    cb = which ? cnt1[be][bs]  : cnt0[be][bs];
    check(ca >= need_a && cb >= need_b,
          $sformatf("ring%0d unit(%0d,%0d) pulse %0d fired early (a=%0d/%0d b=%0d/%0d)",
                    which, e, s, n, ca, need_a, cb, need_b));
    // In-order: no unit may run more than one pulse ahead of what it needs.
    check(ca <= need_a + 1 && cb <= need_b + 1,
          $sformatf("ring%0d unit(%0d,%0d) predecessors ran away", which, e, s));
    if (which) begin cnt1[e][s]++; total1++; end
    else       begin cnt0[e][s]++; total0++; end
  endtask

  // Watch every clock. A pulse of a row must match that row's sel.
  for (genvar e = 0; e < E0; e++) begin : g_w0
    for (genvar s = 0; s < S0; s++) begin : g_s0
      always @(posedge clk0[e][s]) begin
        check(sel0[s][e], $sformatf("ring0 sel of row %0d not on EU %0d", s, e));
        on_pulse(0, e, s);
      end
    end
  end
  for (genvar e = 0; e < E1; e++) begin : g_w1
    for (genvar s = 0; s < S1; s++) begin : g_s1
      always @(posedge clk1[e][s]) begin
        check(sel1[s][e], $sformatf("ring1 sel of row %0d not on EU %0d", s, e));
        on_pulse(1, e, s);
      end
    end
  end

  // Definition 1: no stage active in two EUs at once; sel always one-hot.
  int overlap_samples = 0;
  always #1 if (rst_n) begin
    for (int s = 0; s < S0; s++) begin
      int c;
      c = 0;
      for (int e = 0; e < E0; e++) c += clk0[e][s];
      check(c <= 1, $sformatf("ring0 row %0d active in %0d EUs", s, c));
      check($onehot(sel0[s]), $sformatf("ring0 sel row %0d not one-hot", s));
    end
    for (int s = 0; s < S1; s++) begin
      int c;
      c = 0;
      for (int e = 0; e < E1; e++) c += clk1[e][s];
      check(c <= 1, $sformatf("ring1 row %0d active in %0d EUs", s, c));
      check($onehot(sel1[s]), $sformatf("ring1 sel row %0d not one-hot", s));
    end
    overlap_samples++;
  end

  // Watchdog.
  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_before;
  initial begin
    #1 rst_n = 1'b0;
    en0 = '1; en1 = '1;
    foreach (cnt0[i, j]) cnt0[i][j] = 0;
    foreach (cnt1[i, j]) cnt1[i][j] = 0;
    #40 rst_n = 1'b1;   // longer than any delay element, so the ring is at rest
    // Let both rings run: every unit must fire many times.
    #2000;
    for (int e = 0; e < E0; e++) for (int s = 0; s < S0; s++)
      check(cnt0[e][s] > 5, $sformatf("ring0 unit(%0d,%0d) starved", e, s));
    for (int e = 0; e < E1; e++) for (int s = 0; s < S1; s++)
      check(cnt1[e][s] > 5, $sformatf("ring1 unit(%0d,%0d) starved", e, s));
    // Throughput: with equal DEs one step per DE delay (10), so 6 EUs finish
    // one instruction per step while 3 EUs with alpha=2 need two steps.
    begin
      int i0, i1;
      i0 = cnt0[0][5] + cnt0[1][5] + cnt0[2][5] + cnt0[3][5] + cnt0[4][5] + cnt0[5][5];
      i1 = cnt1[0][5] + cnt1[1][5] + cnt1[2][5];
      $display("instructions completed in 2000 units: E6S6a1=%0d E3S6a2=%0d", i0, i1);
      check(i0 >= 2 * i1 - 2 && i0 <= 2 * i1 + 2, "parallelism ratio of the two rings is not 2");
    end
    // Hold unit (2,3) of ring 0: the whole ring must come to a stop.
    en0[2][3] = 1'b0;
    #500;
    n_before = total0;
    #500;
    check(total0 == n_before, "ring0 keeps running while a unit is held");
    en0[2][3] = 1'b1;
    #500;
    check(total0 > n_before + 20, "ring0 did not resume after release");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
