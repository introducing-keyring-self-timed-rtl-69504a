// keyv_xbs: the crossbar switch (XBS) between the EUs and the shared resources.
//
// Routing: for every stage row s the KeyRing names the owning EU (sel_i[s],
// one-hot); own_o[s] is that EU's stage-(s-1) register, i.e. the instruction
// about to run stage s, and it drives the resource of the row (decoder at D,
// register file at R, ALU at E, LSU/SYS/branch unit at M).
//
// Forwarding: at R the owner needs rs1/rs2. Results of the E-1 instructions
// fetched just before it may not be in the register file yet; each sits in the
// stage registers of its own EU. For each source the crossbar picks the
// youngest older live instruction that writes it, takes its Execute result (or
// its Memory result for loads and CSR reads), and reports whether that result
// exists yet by comparing the EU's Keys: after R of an instruction, its E (M)
// Key matches its R Key once E (M) has fired. Otherwise the value comes from
// the owner's own previous instruction, being written to the register file in
// this same R stage, or from the register file. ready_o is low while a needed
// result is still missing; the R clock of the owner is then held. The
// published design states that the XBS handles data hazards; the hold-at-R policy and
// the selection rule are this design's.
//
// Register file write: the owner's last retired instruction (its W register)
// is written at this R stage, as in the published KeyV design.
//
// Mul/div: md_need_o is high while the E-row owner holds a live mul/div
// instruction that has passed R but not E; its E clock is held until done.
module keyv_xbs
  import keyv_pkg::*;
#(
  parameter int unsigned E = 6
) (
  input  logic [NSTAGE-1:0][E-1:0]     sel_i,
  input  logic [E-1:0][NSTAGE-1:0]     key_i,
  input  uop_t [E-1:0][NSTAGE-1:0]     st_i,
  input  ep_t                          ep_i,
  input  seq_t [3:0]                   end_seq_i,
  // register file
  output logic [4:0]                   rf_raddr1_o,
  output logic [4:0]                   rf_raddr2_o,
  input  logic [31:0]                  rf_rdata1_i,
  input  logic [31:0]                  rf_rdata2_i,
  output logic                         rf_we_o,
  output logic [4:0]                   rf_waddr_o,
  output logic [31:0]                  rf_wdata_o,
  // routed instructions and operands
  output uop_t [NSTAGE-1:0]            own_o,
  output logic [31:0]                  opa_o,
  output logic [31:0]                  opb_o,
  output logic                         ready_o,
  output logic                         fwd_o,     // a forwarded value is used
  output logic                         md_need_o
);

  // Row routing.
  always_comb begin
    own_o = '0;
    for (int s = 1; s < NSTAGE; s++)
      for (int e = 0; e < E; e++)
        if (sel_i[s][e]) own_o[s] = st_i[e][s-1];
  end

  // The R-row owner's previous instruction, written back at this R stage.
  uop_t wb;
  always_comb begin
    wb = '0;
    for (int e = 0; e < E; e++)
      if (sel_i[ST_R][e]) wb = st_i[e][ST_W];
  end

  assign rf_raddr1_o = own_o[ST_R].dec.rs1;
  assign rf_raddr2_o = own_o[ST_R].dec.rs2;
  assign rf_we_o     = wb.dec.rd_we && !is_dead(wb, ep_i, end_seq_i);
  assign rf_waddr_o  = wb.dec.rd;
  assign rf_wdata_o  = wb.res;

  // Operand resolution for one source register.
  function automatic void resolve(input logic [4:0] rs, input logic [31:0] rf_val,
                                  output logic [31:0] val, output logic avail,
                                  output logic fwd);
    uop_t        u, rec;
    seq_t        diff;
    int unsigned best;
    logic        late;
    u     = own_o[ST_R];
    best  = E;
    val   = rf_val;
    avail = 1'b1;
    fwd   = 1'b0;
    if (wb.dec.rd_we && (wb.dec.rd == rs) && !is_dead(wb, ep_i, end_seq_i))
      val = wb.res;
    for (int e = 0; e < E; e++) begin
      rec  = st_i[e][ST_R];
      diff = u.seq - rec.seq;
      late = rec.dec.is_load || rec.dec.is_csr;
      if (!sel_i[ST_R][e] && (diff != '0) && (diff < seq_t'(E)) && (int'(diff) < best) &&
          rec.dec.rd_we && (rec.dec.rd == rs) && !is_dead(rec, ep_i, end_seq_i)) begin
        best  = int'(diff);
        fwd   = 1'b1;
        val   = late ? st_i[e][ST_M].res : st_i[e][ST_E].res;
        avail = late ? (key_i[e][ST_M] == key_i[e][ST_R]) : (key_i[e][ST_E] == key_i[e][ST_R]);
      end
    end
    if (rs == 5'd0) begin
      val   = '0;
      avail = 1'b1;
      fwd   = 1'b0;
    end
  endfunction

  logic av1, av2, fw1, fw2;
  always_comb begin
    resolve(own_o[ST_R].dec.rs1, rf_rdata1_i, opa_o, av1, fw1);
    resolve(own_o[ST_R].dec.rs2, rf_rdata2_i, opb_o, av2, fw2);
  end
  assign ready_o = (av1 || !own_o[ST_R].dec.use_rs1) && (av2 || !own_o[ST_R].dec.use_rs2);
  assign fwd_o   = fw1 || fw2;

  // Mul/div hold of the E row.
  logic md_pass_r;
  always_comb begin
    md_pass_r = 1'b0;
    for (int e = 0; e < E; e++)
      if (sel_i[ST_E][e]) md_pass_r = key_i[e][ST_R] != key_i[e][ST_E];
  end
  assign md_need_o = md_pass_r && own_o[ST_E].dec.is_muldiv &&
                     !is_dead(own_o[ST_E], ep_i, end_seq_i);

endmodule
