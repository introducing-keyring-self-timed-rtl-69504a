// tb_keyring_delay: checks the delay element model: every transition on the
// input appears on the output exactly DELAY (6 here) time units later. Inputs are held for
// at least the delay, as the Keys in the ring are.
module tb_keyring_delay;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic d = 0, q;
  keyring_delay #(.DELAY(6)) dut (.d_i(d), .q_o(q));

  // Reference: history of the input, one entry per 6-unit step.
  logic hist [$];
  initial begin
    #1000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] pattern;
    pattern = 64'hF0F0_3C5A_9966_00FF;
    #8;  // settle the initial value through the delay
    for (int t = 0; t < 64; t++) begin
      d = pattern[t];
      hist.push_back(pattern[t]);
      #3;  // steps are 6 units apart: mid-step the output shows the previous step
      if (t >= 1) check(q == hist[t - 1], $sformatf("q at step %0d", t));
      else        check(q == 1'b0, $sformatf("q before first edge, step %0d", t));
      #3;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
