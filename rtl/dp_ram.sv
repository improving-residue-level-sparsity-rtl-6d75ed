// dp_ram: true dual-port memory bank with synchronous read.
//
// One bank per residue channel holds that channel's encoded weights or its
// feature-map residues, so that every channel can read at its own index.
// Both ports can read or write in the same cycle; a read returns the word
// one cycle after the address is presented (read-before-write on the same
// port).  In the accelerator port A is the fast port (next non-zero weight,
// or the feature map at nz-index) and port B the slow one (index t, for base
// extension).  Dual-ported banks per channel follow the published design; the read
// latency and write behaviour are this design's choice.  Written as an array
// so a tool can map it to a RAM macro.
module dp_ram #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned DEPTH  = 256,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  // port A
  input  logic              a_en,
  input  logic              a_we,
  input  logic [ADDR_W-1:0] a_addr,
  input  logic [DATA_W-1:0] a_wdata,
  output logic [DATA_W-1:0] a_rdata,
  // port B
  input  logic              b_en,
  input  logic              b_we,
  input  logic [ADDR_W-1:0] b_addr,
  input  logic [DATA_W-1:0] b_wdata,
  output logic [DATA_W-1:0] b_rdata
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) begin
      a_rdata <= mem[a_addr];
      if (a_we) mem[a_addr] <= a_wdata;
    end
  end

  always_ff @(posedge clk) begin
    if (b_en) begin
      b_rdata <= mem[b_addr];
      if (b_we) mem[b_addr] <= b_wdata;
    end
  end

endmodule
