// keyring_pkg: shared helpers for the KeyRing clock-generation mesh.
//
// A KeyRing is an E x S toroidal grid of Key units (KUs). Unit (e,s) depends on
// (e, <s-1>_S) and (<e-1>_E, <s+alpha-1>_S), following the connection rule of
// the KeyRing protocol. Each Key is a toggling bit, so a KU may fire once the
// number of toggles of each predecessor leads its own by a fixed amount. Only the
// parity of that lead can be observed on a 1-bit Key; the functions below
// compute, per input, the parity that marks "predecessor is ready" when every
// Key starts at 0 after reset and unit (0,0) is the one that fires first. The
// polarity derivation is this design's own; the published KeyV design only states that a new
// cycle begins when both input Keys have toggled and agree with the local Key.
package keyring_pkg;

  // Index of the stage-predecessor (same EU, previous stage, wrapping).
  function automatic int unsigned pred_a_s(int unsigned s, int unsigned S);
    return (s + S - 1) % S;
  endfunction

  // EU index of the EU-predecessor (previous EU, wrapping).
  function automatic int unsigned pred_b_e(int unsigned e, int unsigned E);
    return (e + E - 1) % E;
  endfunction

  // Stage index of the EU-predecessor: <s + alpha - 1>_S.
  function automatic int unsigned pred_b_s(int unsigned s, int unsigned S, int unsigned ALPHA);
    return (s + ALPHA - 1) % S;
  endfunction

  // Ready parity of the stage input: the predecessor must have fired once more
  // than this unit (same instruction, earlier stage) except on stage 0, where
  // it is the last stage of the previous instruction of the same EU.
  function automatic bit pol_a(int unsigned s);
    return (s != 0);
  endfunction

  // Ready parity of the EU input: one extra lead when the predecessor lives in
  // an EU of lower index, one more when its stage index wrapped around.
  function automatic bit pol_b(int unsigned e, int unsigned s, int unsigned S, int unsigned ALPHA);
    // The sum of the two one-bit leads, taken modulo 2.
    return (e != 0) ^ ((s + ALPHA - 1) >= S);
  endfunction

endpackage
