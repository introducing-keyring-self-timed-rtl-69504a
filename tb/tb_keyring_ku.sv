// tb_keyring_ku: checks the Key unit. The local clock must be high exactly
// when both input Keys show their ready parity against the fed-back local Key,
// the enable is high and reset is released; each clock pulse must toggle the
// Key once, and the pulse must end when the toggled Key returns through the
// feedback path (modelled here by a 2-unit delay).
module tb_keyring_ku;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic rst_n = 1, en = 0, ka = 0, kb = 0, kfb = 0, clk, key;
  logic rst_n2 = 1, en2 = 0, ka2 = 0, kb2 = 0, kfb2 = 0, clk2, key2;

  // Unit 1: POL_A = 1, POL_B = 0 (mid-EU stage); unit 2: both 0.
  keyring_ku #(.POL_A(1'b1), .POL_B(1'b0)) dut  (.rst_ni(rst_n),  .en_i(en),  .key_a_i(ka),  .key_b_i(kb),  .key_fb_i(kfb),  .clk_o(clk),  .key_o(key));
  keyring_ku #(.POL_A(1'b0), .POL_B(1'b0)) dut2 (.rst_ni(rst_n2), .en_i(en2), .key_a_i(ka2), .key_b_i(kb2), .key_fb_i(kfb2), .clk_o(clk2), .key_o(key2));

  always @(key)  kfb  <= #2 key;
  always @(key2) kfb2 <= #2 key2;

  int pulses = 0, pulses2 = 0;
  always @(posedge clk)  pulses++;
  always @(posedge clk2) pulses2++;

  // The clock equation, checked at odd times; all stimulus changes at even times.
  initial #1 forever #2 begin
    check(clk  == (((ka  ^ kfb)  == 1'b1) && ((kb  ^ kfb)  == 1'b0) && en  && rst_n),  "unit 1 clock equation");
    check(clk2 == (((ka2 ^ kfb2) == 1'b0) && ((kb2 ^ kfb2) == 1'b0) && en2 && rst_n2), "unit 2 clock equation");
  end

  initial begin
    #1000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2 rst_n = 0; rst_n2 = 0;
    #2 en = 1; en2 = 1;
    check(clk == 0 && key == 0, "reset holds the Key at 0 with no clock");
    rst_n = 1;
    #6;
    check(pulses == 0, "unit 1 fires without ready inputs");
    ka = 1;                     // stage input ready, EU input ready (parity 0)
    #1;
    check(clk == 1, "unit 1 clock rises when both inputs are ready");
    #5;
    check(pulses == 1 && key == 1 && clk == 0, "one pulse toggles the Key once and ends");
    // Now the Key is 1: ready again needs ka = 0 and kb = 1.
    ka = 0;
    #6;
    check(pulses == 1, "fires with only one input ready");
    en = 0;
    kb = 1;
    #6;
    check(pulses == 1, "fires while disabled");
    en = 1;
    #6;
    check(pulses == 2 && key == 0, "fires once enable returns");
    // Unit 2 with all-zero parity fires straight out of reset, as unit (0,0).
    rst_n2 = 1;
    #6;
    check(pulses2 == 1 && key2 == 1, "unit 2 fires once out of reset");
    ka2 = 1; kb2 = 1;
    #6;
    check(pulses2 == 2 && key2 == 0, "unit 2 fires when both inputs follow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
