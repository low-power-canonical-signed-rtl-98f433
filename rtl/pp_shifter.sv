// pp_shifter: weights the partial products by their digit position.
//
// Partial product i is shifted left by i places and truncated to W bits;
// partial product 0 passes unchanged.  The shifts are fixed wiring, so the
// block has no logic depth.  Purely combinational.  The left shift of every
// partial product but the first follows the design; truncation to W bits
// (exact, since the product fits in W bits) is this implementation's choice.
module pp_shifter #(
  parameter int unsigned NDIG = 17,
  parameter int unsigned W    = 32
) (
  input  logic [W-1:0] pp_in  [NDIG],
  output logic [W-1:0] pp_out [NDIG]
);

  always_comb begin
    pp_out[0] = pp_in[0];
    for (int i = 1; i < NDIG; i++) begin
      pp_out[i] = pp_in[i] << i;
    end
  end

endmodule
