// mod_mac_pe: processing element of one residue channel, a modulo-m
// multiply-accumulate unit.
//
// Each enabled cycle with `valid` set it updates acc <= (acc + w * a) mod m,
// where w and a are residues modulo m.  `clear` zeroes the accumulator (it
// takes priority over an accumulation in the same cycle).  When `en` is low
// the register holds its value; this is the hook for deactivating a whole
// residue channel once it has finished.  One MAC per cycle, result visible
// the cycle after.  The modulo-m MAC is the published design's unit; its internal
// structure (a product, an add and a constant-modulus reduction) is this
// design's own.
module mod_mac_pe #(
  parameter int unsigned MODULUS = 7,
  parameter int unsigned RES_W   = rns_pkg::res_width(MODULUS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             clear,
  input  logic             valid,
  input  logic [RES_W-1:0] w,
  input  logic [RES_W-1:0] a,
  output logic [RES_W-1:0] acc
);

  localparam int unsigned SUM_W = 2 * RES_W + 1;

  logic [SUM_W-1:0] sum;
  logic [RES_W-1:0] acc_next;

  always_comb begin
    sum      = SUM_W'(w) * SUM_W'(a) + SUM_W'(acc);
    acc_next = RES_W'(sum % SUM_W'(MODULUS));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
    end else if (en) begin
      if (clear)      acc <= '0;
      else if (valid) acc <= acc_next;
    end
  end

endmodule
