// keyv_decode: RV32IM instruction decoder (the Decode resource).
//
// Purely combinational: it turns a 32-bit instruction word into a dec_t with
// register indices, immediate, ALU operation, operand selects and class flags
// (branch, jump, load, store, mul/div, CSR read, ecall/ebreak). FENCE decodes
// as a no-op. Unknown encodings set illegal and write no register. In the
// processor the decoded word is captured by the Decode-stage register of the
// EU whose D clock fires, which is how the D clock "clocks" this resource.
module keyv_decode
  import keyv_pkg::*;
(
  input  logic [31:0] ir_i,
  output dec_t        dec_o
);

  logic [6:0] opc;
  logic [2:0] f3;
  logic [6:0] f7;

  assign opc = ir_i[6:0];
  assign f3  = ir_i[14:12];
  assign f7  = ir_i[31:25];

  always_comb begin
    dec_o         = '0;
    dec_o.rs1     = ir_i[19:15];
    dec_o.rs2     = ir_i[24:20];
    dec_o.rd      = ir_i[11:7];
    dec_o.funct3  = f3;
    dec_o.csr     = ir_i[31:20];
    dec_o.alu_op  = ALU_ADD;
    unique case (opc)
      OP_LUI: begin
        dec_o.imm    = {ir_i[31:12], 12'b0};
        dec_o.b_imm  = 1'b1;
        dec_o.alu_op = ALU_PASSB;
        dec_o.rd_we  = 1'b1;
      end
      OP_AUIPC: begin
        dec_o.imm    = {ir_i[31:12], 12'b0};
        dec_o.a_pc   = 1'b1;
        dec_o.b_imm  = 1'b1;
        dec_o.rd_we  = 1'b1;
      end
      OP_JAL: begin
        dec_o.imm    = {{12{ir_i[31]}}, ir_i[19:12], ir_i[20], ir_i[30:21], 1'b0};
        dec_o.is_jal = 1'b1;
        dec_o.rd_we  = 1'b1;
      end
      OP_JALR: begin
        dec_o.imm     = {{20{ir_i[31]}}, ir_i[31:20]};
        dec_o.is_jalr = 1'b1;
        dec_o.b_imm   = 1'b1;
        dec_o.use_rs1 = 1'b1;
        dec_o.rd_we   = 1'b1;
        dec_o.illegal = (f3 != 3'b000);
      end
      OP_BRANCH: begin
        dec_o.imm       = {{20{ir_i[31]}}, ir_i[7], ir_i[30:25], ir_i[11:8], 1'b0};
        dec_o.is_branch = 1'b1;
        dec_o.use_rs1   = 1'b1;
        dec_o.use_rs2   = 1'b1;
        dec_o.illegal   = (f3 == 3'b010) || (f3 == 3'b011);
      end
      OP_LOAD: begin
        dec_o.imm     = {{20{ir_i[31]}}, ir_i[31:20]};
        dec_o.b_imm   = 1'b1;
        dec_o.is_load = 1'b1;
        dec_o.use_rs1 = 1'b1;
        dec_o.rd_we   = 1'b1;
        dec_o.illegal = (f3 == 3'b011) || (f3 == 3'b110) || (f3 == 3'b111);
      end
      OP_STORE: begin
        dec_o.imm      = {{20{ir_i[31]}}, ir_i[31:25], ir_i[11:7]};
        dec_o.b_imm    = 1'b1;
        dec_o.is_store = 1'b1;
        dec_o.use_rs1  = 1'b1;
        dec_o.use_rs2  = 1'b1;
        dec_o.illegal  = (f3 > 3'b010);
      end
      OP_IMM: begin
        dec_o.imm     = {{20{ir_i[31]}}, ir_i[31:20]};
        dec_o.b_imm   = 1'b1;
        dec_o.use_rs1 = 1'b1;
        dec_o.rd_we   = 1'b1;
        unique case (f3)
          3'b000: dec_o.alu_op = ALU_ADD;
          3'b010: dec_o.alu_op = ALU_SLT;
          3'b011: dec_o.alu_op = ALU_SLTU;
          3'b100: dec_o.alu_op = ALU_XOR;
          3'b110: dec_o.alu_op = ALU_OR;
          3'b111: dec_o.alu_op = ALU_AND;
          3'b001: begin
            dec_o.alu_op  = ALU_SLL;
            dec_o.illegal = (f7 != 7'b0000000);
          end
          3'b101: begin
            dec_o.alu_op  = f7[5] ? ALU_SRA : ALU_SRL;
            dec_o.illegal = (f7 != 7'b0000000) && (f7 != 7'b0100000);
          end
          default: ;
        endcase
      end
      OP_REG: begin
        dec_o.use_rs1 = 1'b1;
        dec_o.use_rs2 = 1'b1;
        dec_o.rd_we   = 1'b1;
        if (f7 == 7'b0000001) begin
          dec_o.is_muldiv = 1'b1;
        end else begin
          unique case (f3)
            3'b000: dec_o.alu_op = f7[5] ? ALU_SUB : ALU_ADD;
            3'b001: dec_o.alu_op = ALU_SLL;
            3'b010: dec_o.alu_op = ALU_SLT;
            3'b011: dec_o.alu_op = ALU_SLTU;
            3'b100: dec_o.alu_op = ALU_XOR;
            3'b101: dec_o.alu_op = f7[5] ? ALU_SRA : ALU_SRL;
            3'b110: dec_o.alu_op = ALU_OR;
            3'b111: dec_o.alu_op = ALU_AND;
            default: ;
          endcase
          dec_o.illegal = (f7 != 7'b0000000) &&
                          !((f7 == 7'b0100000) && ((f3 == 3'b000) || (f3 == 3'b101)));
        end
      end
      OP_FENCE: ;
      OP_SYSTEM: begin
        if (f3 == 3'b000) begin
          dec_o.is_halt = (ir_i[31:7] == 25'h0) || (ir_i[31:7] == 25'h2000);
          dec_o.illegal = !dec_o.is_halt;
        end else begin
          // Counter reads (csrrs/csrrc with x0 or any CSR op): writes ignored.
          dec_o.is_csr  = 1'b1;
          dec_o.rd_we   = 1'b1;
          dec_o.use_rs1 = !f3[2];
          dec_o.illegal = (f3 == 3'b100);
        end
      end
      default: dec_o.illegal = 1'b1;
    endcase
    if (dec_o.illegal || dec_o.rd == 5'd0) dec_o.rd_we = 1'b0;
    if (!dec_o.use_rs1) dec_o.rs1 = '0;
    if (!dec_o.use_rs2) dec_o.rs2 = '0;
  end

endmodule
