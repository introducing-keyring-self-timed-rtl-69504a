// tb_keyv_alu: checks the Execute unit. ALU operations on random operands are
// compared with reference results; branch conditions, jumps and their targets
// are checked; a mul/div instruction must run exactly 32 pulses of the inner
// KeyRing, report done, and produce the RV32M result.
module tb_keyv_alu;
  import keyv_pkg::*;
  import tb_keyv_prog_pkg::*;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic rst_n = 1, md_go = 0, taken, md_done, md_clk;
  logic [31:0] ir, res, target;
  dec_t d;
  uop_t u;

  keyv_decode u_dec (.ir_i(ir), .dec_o(d));
  keyv_alu dut (.rst_ni(rst_n), .u_i(u), .md_go_i(md_go), .res_o(res), .taken_o(taken),
                .target_o(target), .md_done_o(md_done), .md_clk_o(md_clk));

  int md_pulses = 0;
  always @(posedge md_clk) md_pulses++;

  seq_t next_seq = 0;
  task automatic load(logic [31:0] instr, logic [31:0] a, logic [31:0] b);
    ir = instr; #1;
    next_seq++;
    u = '0; u.valid = 1; u.pc = 32'h0000_1000; u.ir = instr; u.dec = d; u.a = a; u.b = b;
    u.seq = next_seq;
    #1;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] x, y;
    u = '0;
    #1 rst_n = 0;
    #2 rst_n = 1;
    for (int i = 0; i < 50; i++) begin
      x = $urandom(); y = $urandom();
      load(add(1, 2, 3), x, y);  check(res == x + y, "add");
      load(sub(1, 2, 3), x, y);  check(res == x - y, "sub");
      load(xor_(1, 2, 3), x, y); check(res == (x ^ y), "xor");
      load(sltu(1, 2, 3), x, y); check(res == {31'd0, x < y}, "sltu");
      load(sra(1, 2, 3), x, y);  check(res == $unsigned($signed(x) >>> y[4:0]), "sra");
      load(addi(1, 2, -7), x, y); check(res == x - 7, "addi");
      load(bne(1, 2, -16), x, (i % 2 == 1) ? x : y);
      check(taken == ((i % 2 == 1) ? 1'b0 : (x != y)) && target == 32'h0000_0FF0, "bne");
      load(blt(1, 2, 64), x, y);
      check(taken == ($signed(x) < $signed(y)) && target == 32'h0000_1040, "blt");
    end
    load(lui(1, 32'h12345), 0, 0);  check(res == 32'h1234_5000, "lui");
    load(jal(1, 256), 0, 0);        check(taken && res == 32'h1004 && target == 32'h1100, "jal");
    load(jalr(1, 2, 5), 32'h2000, 0); check(taken && res == 32'h1004 && target == 32'h2004, "jalr clears bit 0");
    // mul/div through the inner KeyRing.
    for (int k = 0; k < 4; k++) begin
      int p0;
      x = $urandom(); y = $urandom_range(1, 1000);
      case (k)
        0: load(mul(1, 2, 3), x, y);
        1: load(divu(1, 2, 3), x, y);
        2: load(rem(1, 2, 3), x, y);
        default: load(mulhu(1, 2, 3), x, y);
      endcase
      p0 = md_pulses;
      md_go = 1;
      wait (md_done);
      #1;
      check(md_pulses - p0 == 32, $sformatf("mul/div used %0d inner pulses", md_pulses - p0));
      case (k)
        0: check(res == x * y, "mul");
        1: check(res == x / y, "divu");
        2: check(res == $unsigned($signed(x) % $signed(y)), "rem");
        default: check(res == 32'(({32'd0, x} * {32'd0, y}) >> 32), "mulhu");
      endcase
      md_go = 0;
      #20;
      check(md_pulses - p0 == 32, "inner ring stays idle after done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
