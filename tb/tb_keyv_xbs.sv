// tb_keyv_xbs: checks the crossbar with three EUs on hand-built stage records:
// row routing, register file addresses and write-back, operand forwarding
// from the youngest older writer, readiness from the EU Keys, skipping of
// killed instructions, x0, and the mul/div hold request.
module tb_keyv_xbs;
  import keyv_pkg::*;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  localparam int E = 3;
  logic [NSTAGE-1:0][E-1:0] sel;
  logic [E-1:0][NSTAGE-1:0] key;
  uop_t [E-1:0][NSTAGE-1:0] st;
  ep_t ep;
  seq_t [3:0] end_seq;
  logic [4:0] ra1, ra2, wa;
  logic [31:0] rd1, rd2, wd, opa, opb;
  logic we, ready, fwd, md_need;
  uop_t [NSTAGE-1:0] own;

  keyv_xbs #(.E(E)) dut (
    .sel_i(sel), .key_i(key), .st_i(st), .ep_i(ep), .end_seq_i(end_seq),
    .rf_raddr1_o(ra1), .rf_raddr2_o(ra2), .rf_rdata1_i(rd1), .rf_rdata2_i(rd2),
    .rf_we_o(we), .rf_waddr_o(wa), .rf_wdata_o(wd),
    .own_o(own), .opa_o(opa), .opb_o(opb), .ready_o(ready), .fwd_o(fwd), .md_need_o(md_need));

  // A live record that writes rd with the given result.
  function automatic uop_t rec(int seq, int rd, logic [31:0] res, bit load = 0);
    uop_t u;
    u = '0; u.valid = 1; u.seq = seq_t'(seq); u.dec.rd = 5'(rd); u.dec.rd_we = 1;
    u.dec.is_load = load; u.res = res;
    return u;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    st = '0; key = '0; ep = 0; end_seq = '0; rd1 = 32'h1111_1111; rd2 = 32'h2222_2222;
    // Routing: row s owned by EU (s mod 3).
    sel = '0;
    for (int s = 0; s < NSTAGE; s++) sel[s][s % E] = 1'b1;
    for (int e = 0; e < E; e++)
      for (int s = 0; s < NSTAGE; s++) st[e][s].pc = 32'(100 * e + s);
    #1;
    for (int s = 1; s < NSTAGE; s++)
      check(own[s].pc == 32'(100 * (s % E) + s - 1), $sformatf("row %0d routed from its owner", s));

    // Forwarding. EU 0 owns R and holds seq 10 in D, reading x5 and x6.
    st = '0; sel = '0;
    sel[ST_R][0] = 1; sel[ST_E][1] = 1;
    st[0][ST_D].valid = 1; st[0][ST_D].seq = 10;
    st[0][ST_D].dec.rs1 = 5; st[0][ST_D].dec.rs2 = 6;
    st[0][ST_D].dec.use_rs1 = 1; st[0][ST_D].dec.use_rs2 = 1;
    // EU 2 ran R for seq 9 writing x5; EU 1 ran R for seq 8 writing x5 and x6 (load).
    st[2][ST_R] = rec(9, 5, 0);  st[2][ST_E].res = 32'hAAAA_0009;
    st[1][ST_R] = rec(8, 6, 0, 1); st[1][ST_M].res = 32'hBBBB_0008;
    key[2][ST_R] = 1; key[2][ST_E] = 1;     // seq 9 has executed
    key[1][ST_R] = 1; key[1][ST_E] = 1; key[1][ST_M] = 0;  // seq 8 has not done M
    #1;
    check(ra1 == 5 && ra2 == 6, "register file read addresses");
    check(opa == 32'hAAAA_0009 && fwd, "x5 forwarded from the Execute result of seq 9");
    check(!ready, "not ready while the load of seq 8 has not done M");
    key[1][ST_M] = 1; #1;
    check(ready && opb == 32'hBBBB_0008, "x6 forwarded from the Memory result once M fired");
    // Youngest writer wins: seq 8 also writes x5 now.
    st[1][ST_R].dec.rd = 5; #1;
    check(opa == 32'hAAAA_0009, "the youngest older writer is chosen");
    check(opb == 32'h2222_2222, "x6 now comes from the register file");
    // Kill seq 9: epoch 0 closed at seq 8.
    st[2][ST_R].ep = 0; st[1][ST_R].ep = 0; st[0][ST_D].ep = 1; ep = 1; end_seq[0] = 8; #1;
    check(opa == 32'hBBBB_0008, "a killed writer is skipped");
    // Write-back of the owner's W record, also a bypass.
    st[1][ST_R].dec.rd_we = 0; st[2][ST_R].dec.rd_we = 0;
    st[0][ST_W] = rec(7, 5, 32'h5555_0007); st[0][ST_W].ep = 1; #1;
    check(we && wa == 5 && wd == 32'h5555_0007, "register file write of the W record");
    check(opa == 32'h5555_0007 && !fwd, "W record bypasses the register file");
    st[0][ST_W].valid = 0; #1;
    check(!we && opa == 32'h1111_1111, "an invalid W record is not written");
    // x0 reads as zero even when a record writes it.
    st[0][ST_D].dec.rs1 = 0; st[2][ST_R] = rec(9, 0, 32'hDEAD); st[2][ST_R].ep = 1; #1;
    check(opa == 0 && ready, "x0 is zero");
    // Mul/div hold request for the E-row owner (EU 1).
    st[1][ST_R] = rec(8, 3, 0); st[1][ST_R].ep = 1; st[1][ST_R].dec.is_muldiv = 1;
    key[1][ST_R] = 1; key[1][ST_E] = 0; #1;
    check(md_need, "mul/div waiting at E asks for a hold");
    key[1][ST_E] = 1; #1;
    check(!md_need, "no hold once E has fired");
    st[1][ST_R].dec.is_muldiv = 0; key[1][ST_E] = 0; #1;
    check(!md_need, "no hold for other instructions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
