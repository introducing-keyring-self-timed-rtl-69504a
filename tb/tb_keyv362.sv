// tb_keyv362: end-to-end test of the KeyV processor in its three-EU
// configuration (E = 3, S = 6, alpha = 2), in which only three stages of
// different instructions overlap. Same program and checks as tb_keyv_core;
// the R holds for a missing operand are fewer here because an ALU result of
// the previous instruction is ready before the R stage of the next one.
module tb_keyv362;
  import tb_keyv_prog_pkg::*;

  localparam int LOOP_N = 10;
  localparam int E      = 3;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  logic rst_n = 1'b1;
  logic perf_clk = 1'b0;
  logic imem_clk, dmem_clk, dmem_we, halted;
  logic [31:0] imem_addr, imem_rdata, dmem_addr, dmem_wdata, dmem_rdata;
  logic [3:0]  dmem_be;
  logic [63:0] instret, cycle;

  always #5 perf_clk = ~perf_clk;

  keyv_core #(.E(3), .ALPHA(2)) dut (
    .rst_ni(rst_n), .perf_clk_i(perf_clk),
    .imem_clk_o(imem_clk), .imem_addr_o(imem_addr), .imem_rdata_i(imem_rdata),
    .dmem_clk_o(dmem_clk), .dmem_addr_o(dmem_addr), .dmem_wdata_o(dmem_wdata),
    .dmem_be_o(dmem_be), .dmem_we_o(dmem_we), .dmem_rdata_i(dmem_rdata),
    .halted_o(halted), .instret_o(instret), .cycle_o(cycle)
  );

  tb_keyv_mem #(.WORDS(256)) mem (
    .dmem_clk_i(dmem_clk), .imem_addr_i(imem_addr), .imem_rdata_o(imem_rdata),
    .dmem_addr_i(dmem_addr), .dmem_wdata_i(dmem_wdata), .dmem_be_i(dmem_be),
    .dmem_we_i(dmem_we), .dmem_rdata_o(dmem_rdata)
  );

  // Mechanism counters.
  int n_rhold = 0, n_ehold = 0, n_md_pulse = 0, n_fwd = 0, n_redirect = 0;
  int n_bubble = 0, n_killed_m = 0, n_f = 0;
  logic rhold, ehold;
  always_comb begin
    rhold = 1'b0;
    ehold = 1'b0;
    for (int e = 0; e < E; e++) begin
      rhold |= dut.sel[2][e] && !dut.en[e][2];
      ehold |= dut.sel[3][e] && !dut.en[e][3] && dut.md_need;
    end
  end
  always @(posedge rhold)             n_rhold++;
  always @(posedge ehold)             n_ehold++;
  always @(posedge dut.md_clk)        n_md_pulse++;
  always @(posedge dut.row_clk[2])    if (dut.fwd) n_fwd++;
  always @(posedge dut.row_clk[4]) begin
    if (dut.redirect) n_redirect++;
    if (dut.own[4].valid && !dut.m_live && !halted) n_killed_m++;
  end
  always @(posedge dut.row_clk[0]) begin
    n_f++;
    if (!dut.fvalid) n_bubble++;
  end

  // Row order: the F pulses must visit the EUs in turn.
  int next_f = 0, order_err = 0;
  for (genvar e = 0; e < E; e++) begin : g_ord
    always @(posedge dut.clk[e][0]) begin
      if (e != next_f) order_err++;
      next_f = (e + 1) % E;
    end
  end

  // Anything that fired before reset was released does not count.
  always @(posedge rst_n) begin
    n_rhold = 0; n_ehold = 0; n_md_pulse = 0; n_fwd = 0; n_redirect = 0;
    n_bubble = 0; n_killed_m = 0; n_f = 0; next_f = 0; order_err = 0;
  end

  // Watchdog.
  initial begin
    #400000;
    failures++;
    $display("FAIL: watchdog, program did not halt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] prog [PROG_WORDS];
    int md_ops, t0, t1;
    build(LOOP_N, prog);
    for (int k = 0; k < 256; k++) begin
      mem.imem[k] = (k < PROG_WORDS) ? prog[k] : 32'h0000_0013;
      mem.dmem[k] = '0;
    end
    #1 rst_n = 1'b0;
    #40 rst_n = 1'b1;   // longer than any delay element, so the ring is at rest
    t0 = int'($time);
    wait (halted);
    t1 = int'($time);
    #200;
    for (int w = 0; w < 15; w++)
      check(mem.dmem[w] == expect_word(LOOP_N, w),
            $sformatf("mem[%0d] = %h, expected %h", w, mem.dmem[w], expect_word(LOOP_N, w)));
    check(mem.dmem[15] == expect_instret(LOOP_N),
          $sformatf("instret read %0d, expected %0d", mem.dmem[15], expect_instret(LOOP_N)));
    check(order_err == 0, "Fetch pulses left EU order");
    // Mechanisms.
    md_ops = 7;
    $display("run time %0d, F pulses %0d, R holds %0d, E holds %0d, md pulses %0d, forwards %0d, redirects %0d, killed at M %0d, bubbles %0d",
             t1 - t0, n_f, n_rhold, n_ehold, n_md_pulse, n_fwd, n_redirect, n_killed_m, n_bubble);
    check(n_rhold > 0,  "no R hold for a missing operand happened");
    check(n_ehold == md_ops, $sformatf("mul/div E holds %0d, expected %0d", n_ehold, md_ops));
    check(n_md_pulse == 32 * md_ops, $sformatf("inner ring pulses %0d, expected %0d", n_md_pulse, 32 * md_ops));
    check(n_fwd > 0,    "no forwarding between EUs happened");
    check(n_redirect == LOOP_N - 1 + 2, $sformatf("redirects %0d, expected %0d", n_redirect, LOOP_N + 1));
    check(n_killed_m > 0, "no killed instruction reached M");
    // With alpha = 2 the last younger fetch coincides with the branch M stage,
    // so every younger instruction is killed and no bubble is needed.
    check(n_bubble == 0, "bubble fetched although none is expected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
