// leading_one_detector: position of the first '1' in a bit vector, counted
// from the most significant bit (the bit the weight decoder reads next).
//
// In the weight decoder each '0' of the code stands for a zero residue and
// each '1' opens a non-zero one, so the number of leading zeros is the
// number of zero weights that can be skipped before the next non-zero
// weight.  Purely combinational: `found` is 0 when the vector holds no '1',
// and `pos` is then W.  Built as a priority scan; the published design names the
// unit but not its structure.
module leading_one_detector #(
  parameter int unsigned W   = 64,
  parameter int unsigned P_W = $clog2(W + 1)
) (
  input  logic [W-1:0]   vec,
  output logic           found,
  output logic [P_W-1:0] pos
);

  always_comb begin
    found = 1'b0;
    pos   = P_W'(W);
    for (int i = 0; i < int'(W); i++) begin
      if (!found && vec[W-1-i]) begin
        found = 1'b1;
        pos   = P_W'(i);
      end
    end
  end

endmodule
