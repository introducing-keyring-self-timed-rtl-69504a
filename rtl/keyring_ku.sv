// keyring_ku: Key unit, the local clock controller of one EU stage.
//
// A toggle flip-flop holds the Key of the stage. Two XOR-based comparators do the
// phase conversion: each compares one incoming Key with the local Key fed back
// through a short buffer. When both inputs show the "ready" parity, and the
// enable allows it, the local clock clk_o rises; its rising edge toggles the
// Key, and once the toggled Key has come back through the feedback buffer the
// comparators no longer match and clk_o falls. The pulse width is therefore the
// feedback buffer delay; the Key goes on to the delay element of the stage.
//
// Interface: key_a_i / key_b_i are the delayed Keys of the stage predecessor
// (e,s-1) and of the EU predecessor (e-1,s+alpha-1). key_fb_i is this unit's own
// Key after the feedback buffer. en_i is an extra level condition used by this
// design to hold a stage (operands not ready, multi-cycle operation running);
// the published KeyV design holds the E clock of a mul/div instruction in the same way.
// rst_ni clears the Key to 0 and blocks the clock.
//
// POL_A / POL_B select which parity of (input Key xor local Key) means ready;
// keyring_pkg computes them. The flip-flop and XOR structure follow the
// published design; the enable input and the polarity parameters are this design's.
//
// Lint tools report the Key as flopped both with and without the asynchronous
// reset (SYNCASYNCNET): the Key is the output of a reset flip-flop and, through
// the comparators of neighbouring units, also takes part in generating their
// clocks. That is how a self-timed ring works and is intended.
module keyring_ku #(
  parameter bit POL_A = 1'b0,
  parameter bit POL_B = 1'b0
) (
  input  logic rst_ni,
  input  logic en_i,
  input  logic key_a_i,
  input  logic key_b_i,
  input  logic key_fb_i,
  output logic clk_o,
  output logic key_o
);

  logic rdy_a, rdy_b;

  assign rdy_a = (key_a_i ^ key_fb_i) == POL_A;
  assign rdy_b = (key_b_i ^ key_fb_i) == POL_B;
  assign clk_o = rdy_a & rdy_b & en_i & rst_ni;

  always_ff @(posedge clk_o or negedge rst_ni) begin
    if (!rst_ni) key_o <= 1'b0;
    else         key_o <= ~key_o;
  end

endmodule
