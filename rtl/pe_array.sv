// pe_array: the M x M processing-element array of one residue channel.
//
// All M*M PEs work modulo the same modulus.  Each step, one weight residue
// `w` is shared by the whole array and every PE (r, c) receives its own
// feature-map residue a[r*M + c]: PE (r, c) accumulates the dot product of
// the weight vector with the input window of output position (r, c).  One
// step per cycle when `valid`; results appear one cycle later in
// acc[r*M + c].  `en` low freezes the whole array (channel deactivated),
// `clear` zeroes it.  The array of M x M PEs per modulus and M = 4 follow
// the published design; sharing one weight per step over the array (the published design
// shows one decoded weight stream per channel entering the array) and the
// output-per-PE mapping are this design's reading.
module pe_array #(
  parameter int unsigned MODULUS = 7,
  parameter int unsigned M       = 4,
  parameter int unsigned RES_W   = rns_pkg::res_width(MODULUS)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       en,
  input  logic                       clear,
  input  logic                       valid,
  input  logic [RES_W-1:0]           w,
  input  logic [M*M-1:0][RES_W-1:0]  a,
  output logic [M*M-1:0][RES_W-1:0]  acc
);

  for (genvar p = 0; p < int'(M * M); p++) begin : g_pe
    mod_mac_pe #(.MODULUS(MODULUS), .RES_W(RES_W)) u_pe (
      .clk   (clk),
      .rst_n (rst_n),
      .en    (en),
      .clear (clear),
      .valid (valid),
      .w     (w),
      .a     (a[p]),
      .acc   (acc[p])
    );
  end

endmodule
