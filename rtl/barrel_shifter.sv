// barrel_shifter: logical left shift of the weight bit buffer by a
// programmable amount, zero-filled from the right.
//
// The weight decoder keeps its not-yet-consumed code bits left-aligned and
// shifts them by the length of the codes it consumes each cycle.  The shift
// is built from log2(W) stages, stage s shifting by 2^s when bit s of
// `amount` is set; amounts of W or more give an all-zero result.
// Combinational.
module barrel_shifter #(
  parameter int unsigned W   = 64,
  parameter int unsigned A_W = $clog2(W + 1)
) (
  input  logic [W-1:0]   din,
  input  logic [A_W-1:0] amount,
  output logic [W-1:0]   dout
);

  localparam int unsigned STAGES = $clog2(W);

  logic [W-1:0] stage [STAGES+1];

  assign stage[0] = din;

  for (genvar s = 0; s < int'(STAGES); s++) begin : g_stage
    assign stage[s+1] = amount[s] ? (stage[s] << (2 ** s)) : stage[s];
  end

  // Any amount bit at or above log2(W) means a shift by W or more.
  if (A_W > STAGES) begin : g_over
    assign dout = (|amount[A_W-1:STAGES]) ? '0 : stage[STAGES];
  end else begin : g_exact
    assign dout = stage[STAGES];
  end

endmodule
