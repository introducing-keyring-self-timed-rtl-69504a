// keyv_core: KeyV, an RV32IM processor built on a KeyRing.
//
// There is no global clock. A KeyRing of E execution units (EUs) by six stages
// (F, D, R, E, M, W) generates one local clock per EU stage; its Keys order the
// stage pulses so that instruction i runs in EU i mod E and overlaps with its
// neighbours as in a pipeline, while every EU is a simple multicycle machine
// holding one instruction. The default (E=6, six stages, ALPHA=1) keeps six
// instructions in flight; E=3, ALPHA=2 keeps three, each EU starting two
// stages after the previous one. The stage list, the shared resources and the
// ORed stage clocks follow the published KeyV; the hazard handling described
// below is this design's own (the published text only says which unit handles
// each hazard).
//
// Shared resources sit behind the crossbar and are clocked by the OR of the
// stage clocks of all EUs for their row: the fetch unit and instruction memory
// by F, the decoder by D, the register file by R, the ALU by E (its mul/div
// by an inner one-unit KeyRing), the LSU, data memory and SYS by M. The crossbar
// routes each row to the EU the KeyRing names in its sel outputs.
//
// Hazards: structural hazards cannot arise (one EU per row at a time). Data
// hazards are solved by forwarding in the crossbar, holding the R clock of an
// instruction whose source is still being computed. A taken branch or jump,
// resolved at E and acted on at M, kills the younger instructions of the other
// EUs and lets the branch's own EU fetch the target (predict not taken). A
// mul/div holds the E clock of its EU for 32 inner-ring pulses, and through the
// KeyRing dependencies the whole ring waits.
//
// Memories are outside the core. imem: address imem_addr_o, data imem_rdata_i
// sampled at the F clock edge (imem_clk_o). dmem: address/data/byte enables
// and write enable valid at the M clock edge (dmem_clk_o), at which a store is
// written; load data dmem_rdata_i is sampled at that edge. perf_clk_i is the
// free-running clock of the cycle counter. halted_o rises when an ecall or
// ebreak completes M; fetch then stops and the ring comes to rest.
module keyv_core
  import keyv_pkg::*;
#(
  parameter int unsigned E           = 6,
  parameter int unsigned ALPHA       = 1,
  parameter int unsigned DE_DELAY    = 10,
  parameter int unsigned FB_DELAY    = 2,
  parameter int unsigned MD_DE_DELAY = 4,
  parameter int unsigned MD_FB_DELAY = 1,
  parameter logic [31:0] RESET_PC    = 32'h0000_0000
) (
  input  logic        rst_ni,
  input  logic        perf_clk_i,
  // instruction memory
  output logic        imem_clk_o,
  output logic [31:0] imem_addr_o,
  input  logic [31:0] imem_rdata_i,
  // data memory
  output logic        dmem_clk_o,
  output logic [31:0] dmem_addr_o,
  output logic [31:0] dmem_wdata_o,
  output logic [3:0]  dmem_be_o,
  output logic        dmem_we_o,
  input  logic [31:0] dmem_rdata_i,
  // status
  output logic        halted_o,
  output logic [63:0] instret_o,
  output logic [63:0] cycle_o
);

  localparam int unsigned S = NSTAGE;

  // KeyRing.
  logic [E-1:0][S-1:0] en, clk, key;
  logic [S-1:0][E-1:0] sel;
  logic [S-1:0]        row_clk;

  keyring #(
    .E(E), .S(S), .ALPHA(ALPHA), .DE_DELAY(DE_DELAY), .FB_DELAY(FB_DELAY)
  ) u_keyring (
    .rst_ni(rst_ni), .en_i(en), .clk_o(clk), .key_o(key), .sel_o(sel)
  );

  // Clocks of the same stage in different EUs are ORed for the resource.
  always_comb begin
    for (int s = 0; s < S; s++) begin
      row_clk[s] = 1'b0;
      for (int e = 0; e < E; e++) row_clk[s] = row_clk[s] | clk[e][s];
    end
  end

  // Execution units.
  uop_t [E-1:0][S-1:0] st;
  uop_t                fetch;
  dec_t                dec;
  logic [31:0]         opa, opb, ex_res, ex_target, mem_res;
  logic                ex_taken;

  for (genvar e = 0; e < E; e++) begin : g_eu
    keyv_eu u_eu (
      .rst_ni     (rst_ni),
      .clk_i      (clk[e]),
      .fetch_i    (fetch),
      .dec_i      (dec),
      .opa_i      (opa),
      .opb_i      (opb),
      .ex_res_i   (ex_res),
      .ex_taken_i (ex_taken),
      .ex_target_i(ex_target),
      .mem_res_i  (mem_res),
      .st_o       (st[e])
    );
  end

  // Crossbar.
  uop_t [S-1:0] own;
  ep_t          ep;
  seq_t [3:0]   end_seq;
  logic [4:0]   rf_ra1, rf_ra2, rf_wa;
  logic [31:0]  rf_rd1, rf_rd2, rf_wd;
  logic         rf_we, ready, fwd, md_need, md_done, md_clk;

  keyv_xbs #(.E(E)) u_xbs (
    .sel_i      (sel),
    .key_i      (key),
    .st_i       (st),
    .ep_i       (ep),
    .end_seq_i  (end_seq),
    .rf_raddr1_o(rf_ra1),
    .rf_raddr2_o(rf_ra2),
    .rf_rdata1_i(rf_rd1),
    .rf_rdata2_i(rf_rd2),
    .rf_we_o    (rf_we),
    .rf_waddr_o (rf_wa),
    .rf_wdata_o (rf_wd),
    .own_o      (own),
    .opa_o      (opa),
    .opb_o      (opb),
    .ready_o    (ready),
    .fwd_o      (fwd),
    .md_need_o  (md_need)
  );

  // Stage holds: R waits for operands, E waits for mul/div, F stops on halt.
  always_comb begin
    for (int e = 0; e < E; e++) begin
      for (int s = 0; s < S; s++) en[e][s] = 1'b1;
      en[e][ST_F] = !halted_o;
      en[e][ST_R] = !sel[ST_R][e] || ready;
      en[e][ST_E] = !sel[ST_E][e] || !md_need || md_done;
    end
  end

  // F: program counter and instruction memory.
  logic        fvalid;
  logic [31:0] fpc;
  seq_t        fseq;
  ep_t         fep;
  logic        m_live, redirect;

  keyv_pc #(.E(E), .RESET_PC(RESET_PC)) u_pc (
    .rst_ni     (rst_ni),
    .clk_f_i    (row_clk[ST_F]),
    .sel_f_i    (sel[ST_F]),
    .addr_o     (imem_addr_o),
    .fvalid_o   (fvalid),
    .fpc_o      (fpc),
    .fseq_o     (fseq),
    .fep_o      (fep),
    .clk_m_i    (row_clk[ST_M]),
    .sel_m_i    (sel[ST_M]),
    .redirect_i (redirect),
    .br_seq_i   (own[ST_M].seq),
    .br_target_i(own[ST_M].target),
    .ep_o       (ep),
    .end_seq_o  (end_seq)
  );

  assign imem_clk_o = row_clk[ST_F];

  always_comb begin
    fetch       = '0;
    fetch.valid = fvalid;
    fetch.ep    = fep;
    fetch.seq   = fseq;
    fetch.pc    = fpc;
    fetch.ir    = fvalid ? imem_rdata_i : 32'h0000_0013;  // bubble = nop
  end

  // D: decoder.
  keyv_decode u_dec (.ir_i(own[ST_D].ir), .dec_o(dec));

  // R: register file.
  keyv_regfile u_rf (
    .clk_i   (row_clk[ST_R]),
    .we_i    (rf_we),
    .waddr_i (rf_wa),
    .wdata_i (rf_wd),
    .raddr1_i(rf_ra1),
    .raddr2_i(rf_ra2),
    .rdata1_o(rf_rd1),
    .rdata2_o(rf_rd2)
  );

  // E: ALU with mul/div on the inner KeyRing.
  keyv_alu #(.MD_DE_DELAY(MD_DE_DELAY), .MD_FB_DELAY(MD_FB_DELAY)) u_alu (
    .rst_ni   (rst_ni),
    .u_i      (own[ST_E]),
    .md_go_i  (md_need),
    .res_o    (ex_res),
    .taken_o  (ex_taken),
    .target_o (ex_target),
    .md_done_o(md_done),
    .md_clk_o (md_clk)
  );

  // M: LSU, SYS and branch redirect.
  logic [31:0] load_data, csr_data;

  assign m_live   = !is_dead(own[ST_M], ep, end_seq) && !halted_o;
  assign redirect = m_live && own[ST_M].taken;

  keyv_lsu u_lsu (
    .u_i         (own[ST_M]),
    .live_i      (m_live),
    .dmem_addr_o (dmem_addr_o),
    .dmem_wdata_o(dmem_wdata_o),
    .dmem_be_o   (dmem_be_o),
    .dmem_we_o   (dmem_we_o),
    .dmem_rdata_i(dmem_rdata_i),
    .load_o      (load_data)
  );

  keyv_sys u_sys (
    .rst_ni     (rst_ni),
    .clk_m_i    (row_clk[ST_M]),
    .perf_clk_i (perf_clk_i),
    .u_i        (own[ST_M]),
    .live_i     (m_live),
    .csr_rdata_o(csr_data),
    .halted_o   (halted_o),
    .instret_o  (instret_o),
    .cycle_o    (cycle_o)
  );

  assign dmem_clk_o = row_clk[ST_M];
  assign mem_res    = own[ST_M].dec.is_load ? load_data :
                      own[ST_M].dec.is_csr  ? csr_data  : own[ST_M].res;

endmodule
