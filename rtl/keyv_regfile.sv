// keyv_regfile: the 32 x 32-bit register file, a shared resource.
//
// Two combinational read ports and one write port. The write port is clocked
// by the OR of all Register Read clocks of the KeyRing: reads and writes both
// happen at the R stage, so the file sees a single clock family. Register x0
// reads as zero and is never written. The R-stage write carries the result of
// the previous instruction of the EU that owns the R row, as the published KeyV design
// describes; bypassing of that write onto the read ports is done by the
// crossbar.
module keyv_regfile (
  input  logic        clk_i,
  input  logic        we_i,
  input  logic [4:0]  waddr_i,
  input  logic [31:0] wdata_i,
  input  logic [4:0]  raddr1_i,
  input  logic [4:0]  raddr2_i,
  output logic [31:0] rdata1_o,
  output logic [31:0] rdata2_o
);

  logic [31:0] regs [32];

  always_ff @(posedge clk_i) begin
    if (we_i && (waddr_i != 5'd0)) regs[waddr_i] <= wdata_i;
  end

  assign rdata1_o = (raddr1_i == 5'd0) ? 32'd0 : regs[raddr1_i];
  assign rdata2_o = (raddr2_i == 5'd0) ? 32'd0 : regs[raddr2_i];

endmodule
