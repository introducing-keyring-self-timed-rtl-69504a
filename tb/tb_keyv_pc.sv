// tb_keyv_pc: checks the program counter with three EUs. Fetch pulses hand
// out consecutive addresses and sequence numbers; after a taken branch is
// reported at Memory, EUs other than the branch's own fetch bubbles, the
// branch's EU fetches the target and sequential fetch resumes from there. The
// epoch advances and records the branch's sequence number.
module tb_keyv_pc;
  import keyv_pkg::*;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  localparam int E = 3;
  logic rst_n = 1, clk_f = 0, clk_m = 0, redirect = 0, fvalid;
  logic [E-1:0] sel_f = 3'b001, sel_m = '0;
  logic [31:0] addr, fpc, tgt = 0;
  seq_t fseq, br_seq = 0;
  ep_t fep, ep;
  seq_t [3:0] end_seq;

  keyv_pc #(.E(E), .RESET_PC(32'h0000_0080)) dut (
    .rst_ni(rst_n), .clk_f_i(clk_f), .sel_f_i(sel_f), .addr_o(addr), .fvalid_o(fvalid),
    .fpc_o(fpc), .fseq_o(fseq), .fep_o(fep), .clk_m_i(clk_m), .sel_m_i(sel_m),
    .redirect_i(redirect), .br_seq_i(br_seq), .br_target_i(tgt), .ep_o(ep), .end_seq_o(end_seq));

  // One Fetch pulse; the owning EU is fseq mod E.
  task automatic fetch();
    #1 clk_f = 1; #1 clk_f = 0;
    sel_f = 3'b001 << (int'(fseq) % E);
    #1;
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;
    #2 rst_n = 1; #1;
    for (int i = 0; i < 6; i++) begin
      check(fvalid && addr == 32'h80 + 4 * i && int'(fseq) == i && fep == 0,
            $sformatf("sequential fetch %0d: addr %h seq %0d", i, addr, fseq));
      fetch();
    end
    // Branch with sequence 4 (EU 1) taken to 0x200, reported at M.
    redirect = 1; br_seq = 4; tgt = 32'h200; sel_m = 3'b010;
    #1 clk_m = 1; #1 clk_m = 0; redirect = 0;
    #1;
    check(ep == 1 && end_seq[0] == 4, "epoch advances and records the branch");
    // fseq is 6 (EU 0): bubble; 7 (EU 1): the target.
    check(!fvalid && fseq == 6, "EU 0 fetches a bubble while the redirect is pending");
    fetch();
    check(fvalid && fseq == 7 && addr == 32'h200 && fep == 1, "branch EU fetches the target");
    fetch();
    check(fvalid && addr == 32'h204 && fseq == 8, "sequential fetch after the target");
    fetch();
    check(fvalid && addr == 32'h208, "second sequential fetch after the target");
    // A cycle with no redirect changes nothing.
    #1 clk_m = 1; #1 clk_m = 0; #1;
    check(ep == 1, "M pulse without redirect keeps the epoch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
