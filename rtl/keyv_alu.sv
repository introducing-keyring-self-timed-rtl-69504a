// keyv_alu: the shared ALU resource, used at the Execute stage.
//
// Combinational part: adder/subtractor, shifter, comparators and logic on the
// operands of the EU that owns the Execute row, plus branch and jump
// resolution (taken, target) and the load/store address. Jumps return pc+4.
// Sequential part: the RV32M multiplier/divider, clocked by a dedicated inner
// KeyRing with a single Key unit (E = S = alpha = 1). The inner ring runs while
// md_go_i asks for a mul/div result that is not ready yet, and stops by itself
// after 32 pulses; once the last inner Key has settled, md_done_o releases the
// Execute clock of the owning EU, which is held until that moment. Both the inner ring and the 32-pulse
// latency are the published KeyV design's; the operand and control wiring is this design's.
module keyv_alu
  import keyv_pkg::*;
#(
  parameter int unsigned MD_DE_DELAY = 4,
  parameter int unsigned MD_FB_DELAY = 1
) (
  input  logic        rst_ni,
  input  uop_t        u_i,        // instruction of the Execute-row owner
  input  logic        md_go_i,    // a live mul/div instruction waits at Execute
  output logic [31:0] res_o,
  output logic        taken_o,
  output logic [31:0] target_o,
  output logic        md_done_o,
  output logic        md_clk_o    // inner KeyRing clock, exposed for observation
);

  logic [31:0] a, b, sum, alu_res;
  logic        eq, lt, ltu, cond;
  dec_t        d;

  assign d   = u_i.dec;
  assign a   = d.a_pc ? u_i.pc : u_i.a;
  assign b   = d.b_imm ? d.imm : u_i.b;
  assign sum = a + b;

  always_comb begin
    unique case (d.alu_op)
      ALU_ADD:   alu_res = sum;
      ALU_SUB:   alu_res = a - b;
      ALU_SLL:   alu_res = a << b[4:0];
      ALU_SLT:   alu_res = {31'd0, $signed(a) < $signed(b)};
      ALU_SLTU:  alu_res = {31'd0, a < b};
      ALU_XOR:   alu_res = a ^ b;
      ALU_SRL:   alu_res = a >> b[4:0];
      ALU_SRA:   alu_res = $unsigned($signed(a) >>> b[4:0]);
      ALU_OR:    alu_res = a | b;
      ALU_AND:   alu_res = a & b;
      ALU_PASSB: alu_res = b;
      default:   alu_res = sum;
    endcase
  end

  // Branch comparison on the register operands.
  assign eq  = (u_i.a == u_i.b);
  assign lt  = $signed(u_i.a) < $signed(u_i.b);
  assign ltu = u_i.a < u_i.b;
  always_comb begin
    unique case (d.funct3)
      3'b000:  cond = eq;
      3'b001:  cond = !eq;
      3'b100:  cond = lt;
      3'b101:  cond = !lt;
      3'b110:  cond = ltu;
      3'b111:  cond = !ltu;
      default: cond = 1'b0;
    endcase
  end

  // Inner KeyRing and mul/div unit.
  logic [0:0][0:0] md_en, md_clk, md_key;
  logic [0:0][0:0] md_sel;
  logic [31:0]     md_res;

  logic md_done_raw, md_key_d;

  assign md_en[0][0] = md_go_i && !md_done_raw;

  // The Execute clock is released only once the last inner Key has crossed its
  // delay element, so the inner ring is at rest when the next mul/div starts.
  keyring_delay #(.DELAY(MD_DE_DELAY)) u_settle (.d_i(md_key[0][0]), .q_o(md_key_d));
  assign md_done_o = md_done_raw && (md_key_d == md_key[0][0]);

  keyring #(
    .E(1), .S(1), .ALPHA(1), .DE_DELAY(MD_DE_DELAY), .FB_DELAY(MD_FB_DELAY)
  ) u_inner_ring (
    .rst_ni(rst_ni), .en_i(md_en), .clk_o(md_clk), .key_o(md_key), .sel_o(md_sel)
  );

  assign md_clk_o = md_clk[0][0];

  keyv_muldiv u_md (
    .clk_i   (md_clk[0][0]),
    .rst_ni  (rst_ni),
    .funct3_i(d.funct3),
    .a_i     (u_i.a),
    .b_i     (u_i.b),
    .tag_i   (u_i.seq),
    .done_o  (md_done_raw),
    .result_o(md_res)
  );

  always_comb begin
    taken_o  = 1'b0;
    target_o = u_i.pc + d.imm;
    res_o    = alu_res;
    if (d.is_jal || d.is_jalr) begin
      taken_o = 1'b1;
      res_o   = u_i.pc + 32'd4;
      if (d.is_jalr) target_o = {sum[31:1], 1'b0};
    end else if (d.is_branch) begin
      taken_o = cond;
    end else if (d.is_muldiv) begin
      res_o = md_res;
    end
  end

endmodule
