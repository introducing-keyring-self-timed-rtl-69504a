// keyv_sys: the system resource (SYS): performance counters and halt.
//
// instret counts the live instructions that pass the Memory stage; it is
// clocked by the OR of the Memory clocks. cycle counts a free-running
// synchronous clock (perf_clk_i), as the published KeyV design gives KeyV a synchronous
// clock for its performance counters. CSR reads of cycle/time/instret (user
// and machine names, low and high halves) return the counter values; writes
// are ignored and unknown CSRs read as zero. An ecall or ebreak that reaches
// the Memory stage live sets halted_o, which stays set until reset: with no
// trap handling in the published KeyV design, this design uses it to end a program.
module keyv_sys
  import keyv_pkg::*;
(
  input  logic        rst_ni,
  input  logic        clk_m_i,
  input  logic        perf_clk_i,
  input  uop_t        u_i,        // instruction of the Memory-row owner
  input  logic        live_i,
  output logic [31:0] csr_rdata_o,
  output logic        halted_o,
  output logic [63:0] instret_o,
  output logic [63:0] cycle_o
);

  always_ff @(posedge clk_m_i or negedge rst_ni) begin
    if (!rst_ni) begin
      instret_o <= '0;
      halted_o  <= 1'b0;
    end else if (live_i) begin
      instret_o <= instret_o + 64'd1;
      if (u_i.dec.is_halt) halted_o <= 1'b1;
    end
  end

  always_ff @(posedge perf_clk_i or negedge rst_ni) begin
    if (!rst_ni) cycle_o <= '0;
    else         cycle_o <= cycle_o + 64'd1;
  end

  always_comb begin
    unique case (u_i.dec.csr)
      CSR_CYCLE, CSR_TIME, CSR_MCYCLE:        csr_rdata_o = cycle_o[31:0];
      CSR_CYCLEH, CSR_TIMEH, CSR_MCYCLEH:     csr_rdata_o = cycle_o[63:32];
      CSR_INSTRET, CSR_MINSTRET:              csr_rdata_o = instret_o[31:0];
      CSR_INSTRETH, CSR_MINSTRETH:            csr_rdata_o = instret_o[63:32];
      default:                                csr_rdata_o = 32'd0;
    endcase
  end

endmodule
