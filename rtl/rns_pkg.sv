// rns_pkg: constants and helper functions shared by the RNS accelerator.
//
// The accelerator computes in the residue number system with base
// B = {5, 7, 31, 32, 33} (dynamic range M = 1,145,760).  Weights and feature
// maps are stored only in the sub-base B_weight = {7, 33}
// (M_weight = 231), which covers signed values -115..+115; the residues
// modulo 5, 31 and 32 are derived by base extension.  The moduli are the
// ones the accelerator is evaluated with; the signed (centred) reading of
// the 0..230 range is this design's choice.
package rns_pkg;

  // Number of moduli in the full base and in the weight sub-base.
  localparam int unsigned N_MOD  = 5;
  localparam int unsigned N_WMOD = 2;

  // Full base B, in channel order.  Channels 0 and 1 form B_weight.
  localparam int unsigned MOD_7  = 7;
  localparam int unsigned MOD_33 = 33;
  localparam int unsigned MOD_5  = 5;
  localparam int unsigned MOD_31 = 31;
  localparam int unsigned MOD_32 = 32;

  // Dynamic range of B_weight and the largest positive value it holds.
  localparam int unsigned M_WEIGHT = MOD_7 * MOD_33;      // 231
  localparam int unsigned W_MAX    = (M_WEIGHT - 1) / 2;  // 115

  // Widest residue in the base (modulo 33 needs 6 bits).
  localparam int unsigned RES_W_MAX = 6;

  // Channel identifiers, in the order used on the accelerator's ports.
  typedef enum logic [2:0] {
    CH_M7  = 3'd0,
    CH_M33 = 3'd1,
    CH_M5  = 3'd2,
    CH_M31 = 3'd3,
    CH_M32 = 3'd4
  } chan_e;

  // Bits needed to hold a residue modulo m (0 .. m-1).
  function automatic int unsigned res_width(input int unsigned m);
    return (m <= 2) ? 1 : $clog2(m);
  endfunction

  // Signed integer -> least non-negative residue modulo m.
  function automatic int unsigned smod(input int x, input int unsigned m);
    int r;
    r = x % int'(m);
    if (r < 0) r += int'(m);
    return int'(r);
  endfunction

endpackage
