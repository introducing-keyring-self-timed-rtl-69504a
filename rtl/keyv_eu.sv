// keyv_eu: one multicycle execution unit (EU) of the KeyV processor.
//
// An EU holds one instruction at a time and walks it through six stages,
// Fetch, Decode, Register Read, Execute, Memory and Register Write, each timed
// by its own local clock from the KeyRing (clk_i[s]). The EU owns only stage
// registers: st_o[s] is the instruction as it stands after stage s. At each
// stage clock the EU copies the previous stage register and fills in what the
// shared resource of that stage delivers on the crossbar: the fetched slot (F),
// the decoded word (D), the operands (R), the ALU result and branch outcome
// (E), the memory or CSR data (M). W only retires the instruction; its result
// is written to the register file at the next R stage of this EU, as the
// published design describes. Since the KeyRing only fires the stage of one EU per row
// at a time, every EU can listen to the same broadcast buses.
// The stage list follows the published KeyV design; the uop layout is this design's.
module keyv_eu
  import keyv_pkg::*;
(
  input  logic                    rst_ni,
  input  logic [NSTAGE-1:0]       clk_i,
  input  uop_t                    fetch_i,
  input  dec_t                    dec_i,
  input  logic [31:0]             opa_i,
  input  logic [31:0]             opb_i,
  input  logic [31:0]             ex_res_i,
  input  logic                    ex_taken_i,
  input  logic [31:0]             ex_target_i,
  input  logic [31:0]             mem_res_i,
  output uop_t [NSTAGE-1:0]       st_o
);

  uop_t f_q, d_q, r_q, e_q, m_q, w_q;

  assign st_o[ST_F] = f_q;
  assign st_o[ST_D] = d_q;
  assign st_o[ST_R] = r_q;
  assign st_o[ST_E] = e_q;
  assign st_o[ST_M] = m_q;
  assign st_o[ST_W] = w_q;

  always_ff @(posedge clk_i[ST_F] or negedge rst_ni) begin
    if (!rst_ni) f_q <= '0;
    else         f_q <= fetch_i;
  end

  always_ff @(posedge clk_i[ST_D] or negedge rst_ni) begin
    if (!rst_ni) d_q <= '0;
    else begin
      d_q     <= f_q;
      d_q.dec <= dec_i;
    end
  end

  always_ff @(posedge clk_i[ST_R] or negedge rst_ni) begin
    if (!rst_ni) r_q <= '0;
    else begin
      r_q   <= d_q;
      r_q.a <= opa_i;
      r_q.b <= opb_i;
    end
  end

  always_ff @(posedge clk_i[ST_E] or negedge rst_ni) begin
    if (!rst_ni) e_q <= '0;
    else begin
      e_q        <= r_q;
      e_q.res    <= ex_res_i;
      e_q.taken  <= ex_taken_i;
      e_q.target <= ex_target_i;
    end
  end

  always_ff @(posedge clk_i[ST_M] or negedge rst_ni) begin
    if (!rst_ni) m_q <= '0;
    else begin
      m_q     <= e_q;
      m_q.res <= mem_res_i;
    end
  end

  always_ff @(posedge clk_i[ST_W] or negedge rst_ni) begin
    if (!rst_ni) w_q <= '0;
    else         w_q <= m_q;
  end

endmodule
