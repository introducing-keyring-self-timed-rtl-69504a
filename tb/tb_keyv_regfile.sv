// tb_keyv_regfile: writes random values to random registers on the R clock and
// compares both read ports against a reference array; x0 must stay zero and a
// write with we low must change nothing.
module tb_keyv_regfile;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic clk = 0, we = 0;
  logic [4:0] wa = 0, ra1 = 0, ra2 = 0;
  logic [31:0] wd = 0, rd1, rd2;
  logic [31:0] ref_regs [32];

  keyv_regfile dut (.clk_i(clk), .we_i(we), .waddr_i(wa), .wdata_i(wd),
                    .raddr1_i(ra1), .raddr2_i(ra2), .rdata1_o(rd1), .rdata2_o(rd2));

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Initialise all registers.
    for (int r = 0; r < 32; r++) begin
      we = 1; wa = r[4:0]; wd = 32'h1000 + r; ref_regs[r] = (r == 0) ? 0 : 32'h1000 + r;
      #1 clk = 1; #1 clk = 0;
    end
    for (int i = 0; i < 400; i++) begin
      we = $urandom_range(0, 3) != 0;
      wa = 5'($urandom());
      wd = $urandom();
      #1 clk = 1; #1 clk = 0;
      if (we && wa != 0) ref_regs[wa] = wd;
      ra1 = 5'($urandom()); ra2 = 5'($urandom());
      #1;
      check(rd1 == ref_regs[ra1], $sformatf("port 1 x%0d = %h, expected %h", ra1, rd1, ref_regs[ra1]));
      check(rd2 == ref_regs[ra2], $sformatf("port 2 x%0d = %h, expected %h", ra2, rd2, ref_regs[ra2]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
