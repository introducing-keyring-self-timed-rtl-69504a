// tb_keyv_sys: checks the system unit: instret counts live instructions on the
// Memory clock only, halted rises on a live ecall and not on a dead one, the
// cycle counter counts the free-running performance clock, and CSR reads
// return the right counter halves.
module tb_keyv_sys;
  import keyv_pkg::*;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic rst_n = 1, clk_m = 0, perf = 0, live = 0, halted;
  uop_t u;
  logic [31:0] csr;
  logic [63:0] instret, cycle;

  keyv_sys dut (.rst_ni(rst_n), .clk_m_i(clk_m), .perf_clk_i(perf), .u_i(u), .live_i(live),
                .csr_rdata_o(csr), .halted_o(halted), .instret_o(instret), .cycle_o(cycle));

  always #5 perf = !perf;

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_live;
    u = '0;
    #1 rst_n = 0;
    #11 rst_n = 1;
    check(instret == 0 && !halted, "reset values");
    n_live = 0;
    for (int i = 0; i < 50; i++) begin
      live = (i % 3) != 0;
      if (live) n_live++;
      #1 clk_m = 1; #1 clk_m = 0;
    end
    check(instret == 64'(n_live), $sformatf("instret %0d, expected %0d", instret, n_live));
    // Dead ecall does not halt; live one does and still retires.
    u.dec.is_halt = 1; live = 0;
    #1 clk_m = 1; #1 clk_m = 0;
    check(!halted, "dead ecall halts");
    live = 1;
    #1 clk_m = 1; #1 clk_m = 0;
    check(halted && instret == 64'(n_live) + 64'd1, "live ecall halts and retires");
    // CSR reads.
    u.dec.is_halt = 0;
    u.dec.csr = 12'hC02; #1;
    check(csr == instret[31:0], "instret read");
    u.dec.csr = 12'hC82; #1;
    check(csr == instret[63:32], "instreth read");
    u.dec.csr = 12'hC00; #1;
    check(csr == cycle[31:0] && cycle != 0, "cycle read");
    u.dec.csr = 12'hB00; #1;
    check(csr == cycle[31:0], "mcycle read");
    u.dec.csr = 12'h123; #1;
    check(csr == 0, "unknown CSR reads zero");
    // Cycle counts perf clock rising edges since reset release.
    begin
      logic [63:0] c0;
      c0 = cycle;
      #100;
      check(cycle - c0 == 10, $sformatf("cycle advanced %0d in 10 periods", cycle - c0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
