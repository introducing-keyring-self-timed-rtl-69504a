// keyring: the KeyRing, an E x S toroidal mesh of Key units (KUs).
//
// Column e is execution unit (EU) e, row s is stage s. Unit (e,s) waits for the
// Key of (e,<s-1>_S) and of (<e-1>_E,<s+ALPHA-1>_S); its own Key goes through a
// delay element (DE) to (e,<s+1>_S) and (<e+1>_E,<s-ALPHA+1>_S). After reset all
// Keys are 0 and only unit (0,0) is ready, so the first clock pulse is the Fetch
// of EU 0; from there the ring orders every stage pulse: instruction i runs in
// EU i mod E, and stage s of instruction i fires after stage s-1 of instruction i
// and after stage s+ALPHA-1 of instruction i-1. With ALPHA*E = lambda*S no stage
// ever runs in two EUs at once (in-order operation).
//
// Outputs: clk_o[e][s] is the local clock of stage s in EU e, key_o the raw
// Keys, and sel_o[s] is a one-hot vector naming the EU that owns row s, i.e. the
// EU whose stage s fires next. The crossbar uses sel_o to route shared
// resources. en_i[e][s] can hold an individual unit (stalls).
//
// Timing: each clock period is set by DE_DELAY (every Key) and the pulse width
// by FB_DELAY (KU feedback buffer); DE_DELAY must exceed FB_DELAY. The published KeyV design
// sizes each DE for its stage; one delay for all DEs is this design's choice.
module keyring
  import keyring_pkg::*;
#(
  parameter int unsigned E        = 6,
  parameter int unsigned S        = 6,
  parameter int unsigned ALPHA    = 1,
  parameter int unsigned DE_DELAY = 10,
  parameter int unsigned FB_DELAY = 2
) (
  input  logic                     rst_ni,
  input  logic [E-1:0][S-1:0]      en_i,
  output logic [E-1:0][S-1:0]      clk_o,
  output logic [E-1:0][S-1:0]      key_o,
  output logic [S-1:0][E-1:0]      sel_o
);

  logic [E-1:0][S-1:0] key_d;   // Keys after the delay elements
  logic [E-1:0][S-1:0] key_fb;  // Keys after the KU feedback buffers

  for (genvar e = 0; e < E; e++) begin : g_eu
    for (genvar s = 0; s < S; s++) begin : g_st
      localparam int unsigned AS = pred_a_s(s, S);
      localparam int unsigned BE = pred_b_e(e, E);
      localparam int unsigned BS = pred_b_s(s, S, ALPHA);

      keyring_ku #(
        .POL_A(pol_a(s)),
        .POL_B(pol_b(e, s, S, ALPHA))
      ) u_ku (
        .rst_ni  (rst_ni),
        .en_i    (en_i[e][s]),
        .key_a_i (key_d[e][AS]),
        .key_b_i (key_d[BE][BS]),
        .key_fb_i(key_fb[e][s]),
        .clk_o   (clk_o[e][s]),
        .key_o   (key_o[e][s])
      );

      keyring_delay #(.DELAY(DE_DELAY)) u_de (.d_i(key_o[e][s]), .q_o(key_d[e][s]));
      keyring_delay #(.DELAY(FB_DELAY)) u_fb (.d_i(key_o[e][s]), .q_o(key_fb[e][s]));

      // Row s belongs to EU e when e is the next EU to fire stage s: EU e has
      // fired stage s as often as EU e-1 (e = 0) or once less (e > 0).
      assign sel_o[s][e] = (key_o[e][s] ^ key_o[BE][s]) == (e != 0);
    end
  end

endmodule
