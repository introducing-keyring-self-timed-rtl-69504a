// keyv_pc: program counter and branch redirection.
//
// Fetch side (clocked by the OR of the Fetch clocks): fpc is the next
// sequential fetch address and fseq the fetch sequence number; every Fetch
// pulse hands out one slot, so instruction fseq runs in EU fseq mod E. The
// fetch unit describes the slot as a uop (valid, pc, seq, epoch) for the EU
// whose F clock fires; the instruction word comes from the instruction memory
// at the address addr_o.
//
// Redirect side (clocked by the OR of the Memory clocks): when the EU that owns
// the M row holds a live taken branch or jump, the epoch advances, end_seq
// records the branch's sequence number and the target and owning EU are kept.
// Until the owning EU fetches again, other EUs fetch bubbles. That EU then
// fetches the target, as in the published KeyV, where the branch's own EU
// processes the branch destination.
// Instructions fetched after the branch and before the redirect are killed by
// keyv_pkg::is_dead, which all side-effecting stages consult. A pending
// redirect is the difference between the fetch epoch and the current epoch, so
// no register is written from both clock families.
//
// The published KeyV design lists the PC among the resources clocked by W; here the fetch
// address moves at F and the redirect is taken at M, which the EU order needs.
module keyv_pc
  import keyv_pkg::*;
#(
  parameter int unsigned E          = 6,
  parameter logic [31:0] RESET_PC   = 32'h0000_0000
) (
  input  logic              rst_ni,
  // Fetch side
  input  logic              clk_f_i,
  input  logic [E-1:0]      sel_f_i,     // EU that owns the Fetch row
  output logic [31:0]       addr_o,      // instruction memory address
  output logic              fvalid_o,    // this slot fetches an instruction
  output logic [31:0]       fpc_o,
  output seq_t              fseq_o,
  output ep_t               fep_o,
  // Redirect side
  input  logic              clk_m_i,
  input  logic [E-1:0]      sel_m_i,     // EU that owns the Memory row
  input  logic              redirect_i,  // live taken branch at M
  input  seq_t              br_seq_i,
  input  logic [31:0]       br_target_i,
  output ep_t               ep_o,
  output seq_t [3:0]        end_seq_o
);

  logic [31:0]  fpc_q;
  seq_t         fseq_q;
  ep_t          fep_q;
  ep_t          ep_q;
  seq_t [3:0]   end_seq_q;
  logic [31:0]  tgt_q;
  logic [E-1:0] owner_q;
  logic         pending, mine;

  assign pending = (fep_q != ep_q);
  assign mine    = |(sel_f_i & owner_q);

  assign fvalid_o = !pending || mine;
  assign addr_o   = pending ? tgt_q : fpc_q;
  assign fpc_o    = addr_o;
  assign fseq_o   = fseq_q;
  assign fep_o    = ep_q;

  always_ff @(posedge clk_f_i or negedge rst_ni) begin
    if (!rst_ni) begin
      fpc_q  <= RESET_PC;
      fseq_q <= '0;
      fep_q  <= '0;
    end else begin
      fseq_q <= fseq_q + 1'b1;
      if (!pending) begin
        fpc_q <= fpc_q + 32'd4;
      end else if (mine) begin
        fpc_q <= tgt_q + 32'd4;
        fep_q <= ep_q;
      end
    end
  end

  always_ff @(posedge clk_m_i or negedge rst_ni) begin
    if (!rst_ni) begin
      ep_q      <= '0;
      end_seq_q <= '0;
      tgt_q     <= RESET_PC;
      owner_q   <= '0;
    end else if (redirect_i) begin
      ep_q            <= ep_q + 1'b1;
      end_seq_q[ep_q] <= br_seq_i;
      tgt_q           <= br_target_i;
      owner_q         <= sel_m_i;
    end
  end

  assign ep_o      = ep_q;
  assign end_seq_o = end_seq_q;

endmodule
