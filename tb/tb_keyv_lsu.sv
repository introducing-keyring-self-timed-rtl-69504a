// tb_keyv_lsu: checks the load/store unit: byte enables, replicated store data
// and the store enable for every access size and byte offset, and sign/zero
// extension of loads from a fixed memory word.
module tb_keyv_lsu;
  import keyv_pkg::*;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  uop_t u;
  logic live;
  logic [31:0] addr, wdata, rdata, load;
  logic [3:0] be;
  logic we;

  keyv_lsu dut (.u_i(u), .live_i(live), .dmem_addr_o(addr), .dmem_wdata_o(wdata),
                .dmem_be_o(be), .dmem_we_o(we), .dmem_rdata_i(rdata), .load_o(load));

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp_load;
    logic [7:0] byt;
    logic [15:0] half;
    u = '0;
    u.b = 32'hCAFE_B0A5;
    rdata = 32'h80FF_7F01;
    for (int off = 0; off < 4; off++) begin
      u.res = 32'h0000_0100 + off;
      // Stores.
      u.dec.is_store = 1; u.dec.is_load = 0;
      u.dec.funct3 = 3'b000; live = 1; #1;
      check(we && addr == 32'h100 + off && be == (4'b0001 << off) && wdata[8*off +: 8] == 8'hA5, $sformatf("sb offset %0d", off));
      if (off % 2 == 0) begin
        u.dec.funct3 = 3'b001; #1;
        check(be == (4'b0011 << off) && wdata[8*off +: 16] == 16'hB0A5, $sformatf("sh offset %0d", off));
      end
      if (off == 0) begin
        u.dec.funct3 = 3'b010; #1;
        check(be == 4'b1111 && wdata == 32'hCAFE_B0A5, "sw");
      end
      live = 0; #1;
      check(!we, "a dead store does not write");
      // Loads.
      u.dec.is_store = 0; u.dec.is_load = 1; live = 1;
      byt = rdata[8*off +: 8];
      u.dec.funct3 = 3'b000; #1;
      check(!we && load == {{24{byt[7]}}, byt}, $sformatf("lb offset %0d", off));
      u.dec.funct3 = 3'b100; #1;
      check(load == {24'd0, byt}, $sformatf("lbu offset %0d", off));
      if (off % 2 == 0) begin
        half = rdata[8*off +: 16];
        u.dec.funct3 = 3'b001; #1;
        check(load == {{16{half[15]}}, half}, $sformatf("lh offset %0d", off));
        u.dec.funct3 = 3'b101; #1;
        check(load == {16'd0, half}, $sformatf("lhu offset %0d", off));
      end
      if (off == 0) begin
        u.dec.funct3 = 3'b010; #1;
        check(load == rdata, "lw");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
