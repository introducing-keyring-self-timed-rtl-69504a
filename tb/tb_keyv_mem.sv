// tb_keyv_mem: behavioural instruction and data memories for the processor
// testbenches. The memories are not part of the processor; like the original
// work, they are modelled with an ideal one-cycle latency: the instruction
// word and the load data are available at the F and M clock edges, and stores
// are written at the M clock edge. Both are word arrays of WORDS entries.
module tb_keyv_mem #(
  parameter int WORDS = 256
) (
  input  logic        dmem_clk_i,
  input  logic [31:0] imem_addr_i,
  output logic [31:0] imem_rdata_o,
  input  logic [31:0] dmem_addr_i,
  input  logic [31:0] dmem_wdata_i,
  input  logic [3:0]  dmem_be_i,
  input  logic        dmem_we_i,
  output logic [31:0] dmem_rdata_o
);
  logic [31:0] imem [WORDS];
  logic [31:0] dmem [WORDS];
  int          stores = 0;

  assign imem_rdata_o = imem[imem_addr_i[2 +: $clog2(WORDS)]];
  assign dmem_rdata_o = dmem[dmem_addr_i[2 +: $clog2(WORDS)]];

  always @(posedge dmem_clk_i) begin
    if (dmem_we_i) begin
      for (int b = 0; b < 4; b++)
        if (dmem_be_i[b]) dmem[dmem_addr_i[2 +: $clog2(WORDS)]][8*b +: 8] <= dmem_wdata_i[8*b +: 8];
      stores++;
    end
  end
endmodule
