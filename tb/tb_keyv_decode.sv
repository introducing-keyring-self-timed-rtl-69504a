// tb_keyv_decode: feeds hand-encoded RV32IM instructions to the decoder and
// compares every relevant field against values worked out from the RISC-V
// instruction formats.
module tb_keyv_decode;
  import keyv_pkg::*;
  import tb_keyv_prog_pkg::*;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [31:0] ir;
  dec_t d;
  keyv_decode dut (.ir_i(ir), .dec_o(d));

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ir = addi(5'd3, 5'd7, -5); #1;
    check(d.rd == 3 && d.rs1 == 7 && d.use_rs1 && !d.use_rs2 && d.rd_we, "addi registers");
    check(d.imm == 32'hFFFF_FFFB && d.b_imm && d.alu_op == ALU_ADD && !d.illegal, "addi immediate");

    ir = sub(5'd1, 5'd2, 5'd3); #1;
    check(d.rs1 == 2 && d.rs2 == 3 && d.use_rs2 && !d.b_imm && d.alu_op == ALU_SUB, "sub");
    ir = sra(5'd1, 5'd2, 5'd3); #1;
    check(d.alu_op == ALU_SRA && !d.is_muldiv, "sra");
    ir = sltu(5'd1, 5'd2, 5'd3); #1;
    check(d.alu_op == ALU_SLTU, "sltu");
    ir = xor_(5'd1, 5'd2, 5'd3); #1;
    check(d.alu_op == ALU_XOR, "xor");

    ir = mulhu(5'd9, 5'd10, 5'd11); #1;
    check(d.is_muldiv && d.funct3 == 3'b011 && d.rd_we && d.use_rs1 && d.use_rs2, "mulhu");
    ir = rem(5'd9, 5'd10, 5'd11); #1;
    check(d.is_muldiv && d.funct3 == 3'b110, "rem");

    ir = lui(5'd4, 32'h000ABCDE); #1;
    check(d.imm == 32'hABCD_E000 && d.alu_op == ALU_PASSB && d.b_imm && d.rd_we && !d.use_rs1, "lui");

    ir = lh(5'd6, 5'd8, -2); #1;
    check(d.is_load && d.funct3 == 3'b001 && d.imm == 32'hFFFF_FFFE && d.rd_we && d.alu_op == ALU_ADD, "lh");

    ir = sw(5'd12, 5'd13, 2044); #1;
    check(d.is_store && !d.rd_we && d.rs1 == 13 && d.rs2 == 12 && d.use_rs2 && d.imm == 32'd2044, "sw");
    ir = sb(5'd12, 5'd13, -1); #1;
    check(d.is_store && d.funct3 == 3'b000 && d.imm == 32'hFFFF_FFFF, "sb negative offset");

    ir = bne(5'd1, 5'd2, -8); #1;
    check(d.is_branch && !d.rd_we && d.imm == 32'hFFFF_FFF8 && d.funct3 == 3'b001 && d.use_rs1 && d.use_rs2, "bne");
    ir = blt(5'd1, 5'd2, 4094); #1;
    check(d.is_branch && d.imm == 32'd4094 && d.funct3 == 3'b100, "blt");

    ir = jal(5'd1, 32'h0F_FFFE); #1;
    check(d.is_jal && d.rd_we && d.rd == 1 && d.imm == 32'h000F_FFFE, "jal");
    ir = jal(5'd0, -2048); #1;
    check(d.is_jal && !d.rd_we && d.imm == 32'hFFFF_F800, "jal to x0 writes nothing");
    ir = jalr(5'd0, 5'd1, 16); #1;
    check(d.is_jalr && d.b_imm && d.imm == 32'd16 && d.use_rs1 && !d.rd_we, "jalr");

    ir = csrr(5'd5, 12'hC02); #1;
    check(d.is_csr && d.csr == 12'hC02 && d.rd_we && d.rd == 5, "csrr instret");
    ir = ECALL; #1;
    check(d.is_halt && !d.rd_we && !d.illegal, "ecall halts");
    ir = 32'h0010_0073; #1;
    check(d.is_halt, "ebreak halts");

    ir = addi(5'd0, 5'd1, 1); #1;
    check(!d.rd_we, "write to x0 is dropped");
    ir = 32'hFFFF_FFFF; #1;
    check(d.illegal && !d.rd_we, "all-ones word is illegal");
    ir = {7'h00, 5'd1, 5'd1, 3'b000, 5'd1, 7'b0010111}; #1;  // auipc x1, 0
    check(d.a_pc && d.b_imm && d.rd_we && d.alu_op == ALU_ADD, "auipc");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
