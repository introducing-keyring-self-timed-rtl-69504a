// tb_keyv_eu: checks one execution unit. Stage clocks are pulsed in order,
// F to W; each stage register must take the previous one and add what its
// shared resource delivers (fetch slot, decoded word, operands, Execute result
// and branch outcome, Memory result). A stage whose clock does not fire must
// hold its register.
module tb_keyv_eu;
  import keyv_pkg::*;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic rst_n = 1;
  logic [NSTAGE-1:0] clk = '0;
  uop_t fetch;
  dec_t dec;
  logic [31:0] opa, opb, ex_res, ex_tgt, mem_res;
  logic ex_taken;
  uop_t [NSTAGE-1:0] st;

  keyv_eu dut (.rst_ni(rst_n), .clk_i(clk), .fetch_i(fetch), .dec_i(dec), .opa_i(opa),
               .opb_i(opb), .ex_res_i(ex_res), .ex_taken_i(ex_taken), .ex_target_i(ex_tgt),
               .mem_res_i(mem_res), .st_o(st));

  task automatic pulse(int s);
    #1 clk[s] = 1; #1 clk[s] = 0; #1;
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0; #1 rst_n = 1;
    check(st == '0, "reset clears all stages");
    for (int i = 0; i < 5; i++) begin
      fetch = '0; fetch.valid = 1; fetch.seq = seq_t'(100 + i); fetch.pc = 32'h40 + 4 * i;
      fetch.ir = $urandom(); fetch.ep = 2'(i);
      dec = '0; dec.rd = 5'(i + 1); dec.rd_we = 1; dec.imm = $urandom();
      opa = $urandom(); opb = $urandom(); ex_res = $urandom(); ex_tgt = $urandom();
      ex_taken = i[0]; mem_res = $urandom();
      pulse(ST_F);
      check(st[ST_F] == fetch, "F takes the fetch slot");
      pulse(ST_D);
      check(st[ST_D].seq == fetch.seq && st[ST_D].ir == fetch.ir && st[ST_D].dec == dec, "D adds the decode");
      pulse(ST_R);
      check(st[ST_R].a == opa && st[ST_R].b == opb && st[ST_R].dec == dec && st[ST_R].pc == fetch.pc, "R adds the operands");
      check(st[ST_E].seq != fetch.seq, "E holds until its clock");
      pulse(ST_E);
      check(st[ST_E].res == ex_res && st[ST_E].taken == ex_taken && st[ST_E].target == ex_tgt &&
            st[ST_E].a == opa, "E adds the result");
      pulse(ST_M);
      check(st[ST_M].res == mem_res && st[ST_M].target == ex_tgt && st[ST_M].ep == fetch.ep, "M adds the memory result");
      check(st[ST_W].seq != fetch.seq, "W holds until its clock");
      pulse(ST_W);
      check(st[ST_W] == st[ST_M], "W takes M");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
