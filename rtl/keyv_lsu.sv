// keyv_lsu: load/store unit between the Memory-row owner and the data memory.
//
// Combinational. For a store it aligns the data and forms byte enables on the
// word-addressed data memory bus (dmem_addr_o is the byte address, bits 1:0
// select the lane); the write itself happens on the data memory at the Memory
// clock. For a load it picks the addressed byte, half-word or word out of the
// read word and sign- or zero-extends it. The memory itself lies outside the
// processor, as in the published KeyV design. Misaligned accesses are not trapped: the
// lanes simply wrap within the word (this design's choice).
module keyv_lsu
  import keyv_pkg::*;
(
  input  uop_t        u_i,          // instruction of the Memory-row owner
  input  logic        live_i,       // it is valid and not killed
  output logic [31:0] dmem_addr_o,
  output logic [31:0] dmem_wdata_o,
  output logic [3:0]  dmem_be_o,
  output logic        dmem_we_o,
  input  logic [31:0] dmem_rdata_i,
  output logic [31:0] load_o
);

  logic [1:0]  off;
  logic [31:0] sh;

  assign dmem_addr_o = u_i.res;
  assign off         = u_i.res[1:0];
  assign dmem_we_o   = live_i && u_i.dec.is_store;

  always_comb begin
    unique case (u_i.dec.funct3[1:0])
      2'b00:   begin dmem_be_o = 4'b0001 << off;  dmem_wdata_o = {4{u_i.b[7:0]}};  end
      2'b01:   begin dmem_be_o = 4'b0011 << off;  dmem_wdata_o = {2{u_i.b[15:0]}}; end
      default: begin dmem_be_o = 4'b1111;         dmem_wdata_o = u_i.b;            end
    endcase
  end

  assign sh = dmem_rdata_i >> {off, 3'b000};
  always_comb begin
    unique case (u_i.dec.funct3)
      3'b000:  load_o = {{24{sh[7]}}, sh[7:0]};
      3'b001:  load_o = {{16{sh[15]}}, sh[15:0]};
      3'b100:  load_o = {24'd0, sh[7:0]};
      3'b101:  load_o = {16'd0, sh[15:0]};
      default: load_o = dmem_rdata_i;
    endcase
  end

endmodule
