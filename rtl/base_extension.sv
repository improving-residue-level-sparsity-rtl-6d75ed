// base_extension: extends a value held in the weight sub-base
// B_weight = {7, 33} to the remaining moduli {5, 31, 32} of the full base.
//
// Weights and feature maps are stored only as residues modulo 7 and 33.
// The channels modulo 5, 31 and 32 need the same value's residues, which
// this unit derives by mixed-radix conversion:
//   v = ((x33 - x7) * 7^-1) mod 33,   7^-1 mod 33 = 19,
//   X = x7 + 7 * v                     (0 <= X < 231),
// read as signed: X > 115 stands for X - 231.  Each output residue is then
// (X mod m) for a positive value and ((X - 231) mod m) for a negative one,
// the latter formed as (X + (m - 231 mod m)) mod m.  Combinational; the
// accelerator instantiates one for the weight stream and one per PE for
// the feature-map stream.  Base extension from B_weight to B follows the
// document; the mixed-radix method and signed reading are this design's.
module base_extension (
  input  logic [2:0] r7,
  input  logic [5:0] r33,
  output logic [2:0] r5,
  output logic [4:0] r31,
  output logic [4:0] r32,
  output logic       neg
);

  import rns_pkg::*;

  localparam int unsigned INV7_33 = 19;  // 7 * 19 = 133 = 4*33 + 1
  localparam int unsigned OFF5  = (MOD_5  - M_WEIGHT % MOD_5)  % MOD_5;
  localparam int unsigned OFF31 = (MOD_31 - M_WEIGHT % MOD_31) % MOD_31;
  localparam int unsigned OFF32 = (MOD_32 - M_WEIGHT % MOD_32) % MOD_32;

  logic [6:0]  diff;   // r33 - r7 + 33, 27 .. 65
  logic [11:0] prod;
  logic [5:0]  v;
  logic [7:0]  x;      // 0 .. 230
  logic [8:0]  x5, x31, x32;

  always_comb begin
    diff = 7'(r33) + 7'(MOD_33) - 7'(r7);
    prod = 12'(diff) * 12'(INV7_33);
    v    = 6'(prod % 12'(MOD_33));
    x    = 8'(r7) + 8'(MOD_7) * 8'(v);
    neg  = (x > 8'(W_MAX));
    x5   = 9'(x) + (neg ? 9'(OFF5)  : 9'd0);
    x31  = 9'(x) + (neg ? 9'(OFF31) : 9'd0);
    x32  = 9'(x) + (neg ? 9'(OFF32) : 9'd0);
    r5   = 3'(x5  % 9'(MOD_5));
    r31  = 5'(x31 % 9'(MOD_31));
    r32  = x32[4:0];
  end

endmodule
