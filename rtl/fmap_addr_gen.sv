// fmap_addr_gen: feature-map address unit ("Address A") of a zero-skipping
// residue channel.
//
// The weight decoder gives the index of the next non-zero weight
// (nz-index); the feature-map residue that multiplies it lies at
// base + nz-index in the channel's feature-map bank.  The unit adds the
// layer's base address to the index and passes the request on as a memory
// read enable and address, with no register (the bank itself registers the
// read).  The published design names the unit and feeds it the nz-index; the base
// register is this design's choice.
module fmap_addr_gen #(
  parameter int unsigned IDX_W  = 11,
  parameter int unsigned ADDR_W = 10
) (
  input  logic              idx_valid,
  input  logic [IDX_W-1:0]  nz_index,
  input  logic [ADDR_W-1:0] base,
  output logic              rd_en,
  output logic [ADDR_W-1:0] rd_addr
);

  assign rd_en   = idx_valid;
  assign rd_addr = base + ADDR_W'(nz_index);

endmodule
