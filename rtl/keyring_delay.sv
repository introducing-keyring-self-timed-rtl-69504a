// keyring_delay: behavioural model of a delay element (DE).
//
// This is a behavioural model, not synthesizable logic: in silicon a DE is a
// chain of standard cells sized so that its delay covers the logic of the stage
// it times (and, with a small DELAY, the feedback buffer of a Key unit). The
// model delays d_i by DELAY time units; an input change is expected to be held
// for at least DELAY before the next one, as a Key is. Each Key of a
// KeyRing passes through one DE before it reaches the Key units that depend on
// it. The published KeyV design leaves DE sizing to the synthesis flow; DELAY is a free
// parameter here.
module keyring_delay #(
  parameter int unsigned DELAY = 10
) (
  input  logic d_i,
  output logic q_o
);

  // Keys reset to 0, so the line starts empty at 0.
  initial q_o = 1'b0;

  always @(d_i) q_o <= #(DELAY) d_i;

endmodule
