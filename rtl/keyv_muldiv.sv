// keyv_muldiv: iterative RV32M multiplier/divider, one step per inner clock.
//
// The unit is clocked by the inner KeyRing (a single Key unit ring), not by the
// main ring. An operation takes exactly 32 pulses: pulse k (k = 0..31) adds the
// partial product of bit k of the multiplier, or produces quotient bit 31-k of
// a restoring division. Operands are taken from the crossbar, where they stay
// stable while the Execute clock of the owning EU is held. tag_i names the
// instruction; a pulse with a tag different from the stored one restarts the
// count, so no reset path from the main ring is needed. done_o is high once 32
// pulses have been applied for tag_i; result_o is then valid.
//
// Signed operations work on magnitudes and fix the sign at the end. Division
// by zero returns all ones (quotient) and the dividend (remainder); the signed
// overflow case falls out of the magnitude arithmetic, both as RISC-V defines.
// The 32-pulse latency is the published KeyV design's; the algorithm is this design's.
module keyv_muldiv
  import keyv_pkg::*;
(
  input  logic        clk_i,     // inner KeyRing clock
  input  logic        rst_ni,
  input  logic [2:0]  funct3_i,  // RV32M funct3
  input  logic [31:0] a_i,
  input  logic [31:0] b_i,
  input  seq_t        tag_i,
  output logic        done_o,
  output logic [31:0] result_o
);

  logic [5:0]  cnt_q;
  seq_t        tag_q;
  logic [63:0] acc_q;   // product, or {remainder, quotient} for a division
  logic [4:0]  k;
  logic        is_div, a_signed, b_signed, a_neg, b_neg;
  logic [31:0] a_mag, b_mag;

  assign is_div   = funct3_i[2];
  assign a_signed = is_div ? !funct3_i[0] : (funct3_i[1:0] != 2'b11) && (funct3_i[1:0] != 2'b00);
  assign b_signed = is_div ? !funct3_i[0] : (funct3_i[1:0] == 2'b01);
  assign a_neg    = a_signed && a_i[31];
  assign b_neg    = b_signed && b_i[31];
  assign a_mag    = a_neg ? -a_i : a_i;
  assign b_mag    = b_neg ? -b_i : b_i;

  // Step index of the next pulse: 0 when a new instruction arrives.
  assign k = (tag_q != tag_i) ? 5'd0 : cnt_q[4:0];

  logic [63:0] acc_base, acc_next;
  logic [32:0] rem_sh, rem_sub;

  always_comb begin
    acc_base = (k == 5'd0) ? 64'd0 : acc_q;
    acc_next = acc_base;
    rem_sh   = '0;
    rem_sub  = '0;
    if (!is_div) begin
      if (b_mag[k]) acc_next = acc_base + ({32'd0, a_mag} << k);
    end else begin
      // acc = {remainder[31:0], quotient[31:0]}
      rem_sh  = {acc_base[63:32], a_mag[5'd31 - k]};
      rem_sub = rem_sh - {1'b0, b_mag};
      if (!rem_sub[32]) begin
        acc_next[63:32] = rem_sub[31:0];
        acc_next[{1'b0, 5'd31 - k}] = 1'b1;
      end else begin
        acc_next[63:32] = rem_sh[31:0];
      end
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      cnt_q <= '0;
      tag_q <= '0;
      acc_q <= '0;
    end else begin
      tag_q <= tag_i;
      cnt_q <= {1'b0, k} + 6'd1;
      acc_q <= acc_next;
    end
  end

  assign done_o = (tag_q == tag_i) && (cnt_q == 6'd32);

  logic [63:0] prod;
  logic [31:0] quo, rem;
  always_comb begin
    prod = (a_neg ^ b_neg) ? -acc_q : acc_q;
    quo  = (a_neg ^ b_neg) ? -acc_q[31:0] : acc_q[31:0];
    rem  = a_neg ? -acc_q[63:32] : acc_q[63:32];
    if (b_i == 32'd0) begin
      quo = '1;
      rem = a_i;
    end
    unique case (funct3_i)
      3'b000:  result_o = prod[31:0];
      3'b001, 3'b010, 3'b011: result_o = prod[63:32];
      3'b100, 3'b101: result_o = quo;
      default: result_o = rem;
    endcase
  end

endmodule
