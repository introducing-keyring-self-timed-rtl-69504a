// tb_keyv_prog_pkg: a small RV32IM instruction encoder and the test program
// used by the processor testbenches, with the data memory image the program
// must leave behind. The expected values are worked out by hand from the
// RISC-V specification, independently of the processor.
package tb_keyv_prog_pkg;

  function automatic logic [31:0] r_t(logic [6:0] f7, logic [4:0] rs2, logic [4:0] rs1,
                                      logic [2:0] f3, logic [4:0] rd, logic [6:0] op);
    return {f7, rs2, rs1, f3, rd, op};
  endfunction
  function automatic logic [31:0] i_t(int imm, logic [4:0] rs1, logic [2:0] f3,
                                      logic [4:0] rd, logic [6:0] op);
    logic [11:0] i;
    i = imm[11:0];
    return {i, rs1, f3, rd, op};
  endfunction
  function automatic logic [31:0] s_t(int imm, logic [4:0] rs2, logic [4:0] rs1, logic [2:0] f3);
    logic [11:0] i;
    i = imm[11:0];
    return {i[11:5], rs2, rs1, f3, i[4:0], 7'b0100011};
  endfunction
  function automatic logic [31:0] b_t(int off, logic [4:0] rs2, logic [4:0] rs1, logic [2:0] f3);
    logic [12:0] i;
    i = off[12:0];
    return {i[12], i[10:5], rs2, rs1, f3, i[4:1], i[11], 7'b1100011};
  endfunction
  function automatic logic [31:0] j_t(int off, logic [4:0] rd);
    logic [20:0] i;
    i = off[20:0];
    return {i[20], i[10:1], i[11], i[19:12], rd, 7'b1101111};
  endfunction

  function automatic logic [31:0] addi(logic [4:0] rd, logic [4:0] rs1, int imm);
    return i_t(imm, rs1, 3'b000, rd, 7'b0010011);
  endfunction
  function automatic logic [31:0] add (logic [4:0] rd, logic [4:0] a, logic [4:0] b); return r_t(7'h00, b, a, 3'b000, rd, 7'b0110011); endfunction
  function automatic logic [31:0] sub (logic [4:0] rd, logic [4:0] a, logic [4:0] b); return r_t(7'h20, b, a, 3'b000, rd, 7'b0110011); endfunction
  function automatic logic [31:0] sra (logic [4:0] rd, logic [4:0] a, logic [4:0] b); return r_t(7'h20, b, a, 3'b101, rd, 7'b0110011); endfunction
  function automatic logic [31:0] sltu(logic [4:0] rd, logic [4:0] a, logic [4:0] b); return r_t(7'h00, b, a, 3'b011, rd, 7'b0110011); endfunction
  function automatic logic [31:0] xor_(logic [4:0] rd, logic [4:0] a, logic [4:0] b); return r_t(7'h00, b, a, 3'b100, rd, 7'b0110011); endfunction
  function automatic logic [31:0] mul (logic [4:0] rd, logic [4:0] a, logic [4:0] b); return r_t(7'h01, b, a, 3'b000, rd, 7'b0110011); endfunction
  function automatic logic [31:0] mulh(logic [4:0] rd, logic [4:0] a, logic [4:0] b); return r_t(7'h01, b, a, 3'b001, rd, 7'b0110011); endfunction
  function automatic logic [31:0] mulhu(logic [4:0] rd, logic [4:0] a, logic [4:0] b); return r_t(7'h01, b, a, 3'b011, rd, 7'b0110011); endfunction
  function automatic logic [31:0] div (logic [4:0] rd, logic [4:0] a, logic [4:0] b); return r_t(7'h01, b, a, 3'b100, rd, 7'b0110011); endfunction
  function automatic logic [31:0] divu(logic [4:0] rd, logic [4:0] a, logic [4:0] b); return r_t(7'h01, b, a, 3'b101, rd, 7'b0110011); endfunction
  function automatic logic [31:0] rem (logic [4:0] rd, logic [4:0] a, logic [4:0] b); return r_t(7'h01, b, a, 3'b110, rd, 7'b0110011); endfunction
  function automatic logic [31:0] lui (logic [4:0] rd, int imm20); return {imm20[19:0], rd, 7'b0110111}; endfunction
  function automatic logic [31:0] lw  (logic [4:0] rd, logic [4:0] rs1, int imm); return i_t(imm, rs1, 3'b010, rd, 7'b0000011); endfunction
  function automatic logic [31:0] lh  (logic [4:0] rd, logic [4:0] rs1, int imm); return i_t(imm, rs1, 3'b001, rd, 7'b0000011); endfunction
  function automatic logic [31:0] lb  (logic [4:0] rd, logic [4:0] rs1, int imm); return i_t(imm, rs1, 3'b000, rd, 7'b0000011); endfunction
  function automatic logic [31:0] lbu (logic [4:0] rd, logic [4:0] rs1, int imm); return i_t(imm, rs1, 3'b100, rd, 7'b0000011); endfunction
  function automatic logic [31:0] sw  (logic [4:0] rs2, logic [4:0] rs1, int imm); return s_t(imm, rs2, rs1, 3'b010); endfunction
  function automatic logic [31:0] sh  (logic [4:0] rs2, logic [4:0] rs1, int imm); return s_t(imm, rs2, rs1, 3'b001); endfunction
  function automatic logic [31:0] sb  (logic [4:0] rs2, logic [4:0] rs1, int imm); return s_t(imm, rs2, rs1, 3'b000); endfunction
  function automatic logic [31:0] bne (logic [4:0] a, logic [4:0] b, int off); return b_t(off, b, a, 3'b001); endfunction
  function automatic logic [31:0] blt (logic [4:0] a, logic [4:0] b, int off); return b_t(off, b, a, 3'b100); endfunction
  function automatic logic [31:0] jal (logic [4:0] rd, int off); return j_t(off, rd); endfunction
  function automatic logic [31:0] jalr(logic [4:0] rd, logic [4:0] rs1, int imm); return i_t(imm, rs1, 3'b000, rd, 7'b1100111); endfunction
  function automatic logic [31:0] csrr(logic [4:0] rd, logic [11:0] csr); return {csr, 5'd0, 3'b010, rd, 7'b1110011}; endfunction
  localparam logic [31:0] ECALL = 32'h0000_0073;
  localparam logic [31:0] NOP   = 32'h0000_0013;

  localparam int PROG_WORDS = 64;
  localparam int N_RESULTS  = 16;

  // The test program. Loop bound n sets the length of the summing loop.
  function automatic void build(int n, output logic [31:0] prog [PROG_WORDS]);
    int p;
    for (int k = 0; k < PROG_WORDS; k++) prog[k] = NOP;
    p = 0;
    prog[p++] = addi(1, 0, 0);          // 0  sum = 0
    prog[p++] = addi(2, 0, 1);          // 1  i = 1
    prog[p++] = addi(3, 0, n + 1);      // 2  limit
    prog[p++] = add (1, 1, 2);          // 3  loop: sum += i   (back-to-back use)
    prog[p++] = addi(2, 2, 1);          // 4  i++
    prog[p++] = bne (2, 3, -8);         // 5  taken n-1 times
    prog[p++] = sw  (1, 0, 0);          // 6  mem[0]  = n(n+1)/2
    prog[p++] = addi(4, 0, -7);         // 7
    prog[p++] = addi(5, 0, 3);          // 8
    prog[p++] = mul (6, 4, 5);          // 9  -21
    prog[p++] = sw  (6, 0, 4);          // 10 mem[1]
    prog[p++] = div (7, 4, 5);          // 11 -2
    prog[p++] = sw  (7, 0, 8);          // 12 mem[2]
    prog[p++] = rem (8, 4, 5);          // 13 -1
    prog[p++] = sw  (8, 0, 12);         // 14 mem[3]
    prog[p++] = mulhu(9, 4, 5);         // 15 2
    prog[p++] = sw  (9, 0, 16);         // 16 mem[4]
    prog[p++] = divu(10, 4, 0);         // 17 0xffffffff
    prog[p++] = sw  (10, 0, 20);        // 18 mem[5]
    prog[p++] = lui (11, 32'h12345);    // 19
    prog[p++] = addi(11, 11, 32'h678);  // 20 0x12345678
    prog[p++] = sw  (11, 0, 24);        // 21 mem[6]
    prog[p++] = lb  (12, 0, 25);        // 22 0x56
    prog[p++] = addi(12, 12, 1);        // 23 load-use: 0x57
    prog[p++] = sw  (12, 0, 28);        // 24 mem[7]
    prog[p++] = sb  (12, 0, 32);        // 25 mem[8] byte 0
    prog[p++] = sh  (11, 0, 34);        // 26 mem[8] bytes 2..3
    prog[p++] = lh  (13, 0, 34);        // 27 0x5678
    prog[p++] = sw  (13, 0, 36);        // 28 mem[9]
    prog[p++] = jal (14, 4 * (48 - 29));// 29 call func at word 48
    prog[p++] = sw  (15, 0, 40);        // 30 mem[10] = 99
    prog[p++] = sra (19, 4, 5);         // 31 -7 >>> 3 = -1
    prog[p++] = sw  (19, 0, 44);        // 32 mem[11]
    prog[p++] = sltu(20, 5, 4);         // 33 3 < 0xfffffff9 = 1
    prog[p++] = lw  (17, 0, 0);         // 34 sum
    prog[p++] = add (18, 17, 20);       // 35 load-use: sum + 1
    prog[p++] = sw  (18, 0, 48);        // 36 mem[12]
    prog[p++] = mulh(21, 4, 4);         // 37 (-7*-7)>>32 = 0
    prog[p++] = mul (22, 4, 4);         // 38 49
    prog[p++] = add (22, 22, 21);       // 39 49
    prog[p++] = sw  (22, 0, 52);        // 40 mem[13]
    prog[p++] = lbu (23, 0, 27);        // 41 0x12
    prog[p++] = sw  (23, 0, 56);        // 42 mem[14]
    prog[p++] = csrr(16, 12'hC02);      // 43 instret
    prog[p++] = sw  (16, 0, 60);        // 44 mem[15]
    prog[p++] = ECALL;                  // 45
    p = 48;
    prog[p++] = addi(15, 0, 99);        // 48 func
    prog[p++] = jalr(0, 14, 0);         // 49 return
  endfunction

  // Expected data memory words 0..14 (word 15, instret, is range-checked).
  function automatic logic [31:0] expect_word(int n, int w);
    case (w)
      0:  return n * (n + 1) / 2;
      1:  return -21;
      2:  return -2;
      3:  return -1;
      4:  return 2;
      5:  return 32'hffff_ffff;
      6:  return 32'h1234_5678;
      7:  return 32'h57;
      8:  return 32'h5678_0057;
      9:  return 32'h5678;
      10: return 99;
      11: return 32'hffff_ffff;
      12: return n * (n + 1) / 2 + 1;
      13: return 49;
      14: return 32'h12;
      default: return 0;
    endcase
  endfunction

  // Live instructions before the csrr: 3 set-up, 3 per loop pass, 23 up to
  // the call, the call and the two of the function, 13 after the return.
  function automatic int expect_instret(int n);
    return 3 + 3 * n + 23 + 1 + 2 + 13;
  endfunction

endpackage
