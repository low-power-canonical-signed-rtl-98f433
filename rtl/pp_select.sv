// pp_select: picks one partial-product candidate per CSD digit.
//
// For digit i: magnitude 0 selects the zero candidate, magnitude 1 with sign
// 0 selects +A, magnitude 1 with sign 1 selects -A.  The NDIG results are
// still unweighted (digit 0 weight); pp_shifter applies the weights.
// Purely combinational: a 3-way mux per digit.  Choosing among the three
// candidates by sign and magnitude follows the design; treating a zero
// magnitude as 'select 0' whatever the sign is this implementation's reading.
module pp_select #(
  parameter int unsigned NDIG = 17,
  parameter int unsigned W    = 32
) (
  input  logic [W-1:0]    cand_pos,
  input  logic [W-1:0]    cand_neg,
  input  logic [W-1:0]    cand_zero,
  input  logic [NDIG-1:0] mag,
  input  logic [NDIG-1:0] sgn,
  output logic [W-1:0]    pp [NDIG]
);

  always_comb begin
    for (int i = 0; i < NDIG; i++) begin
      if (!mag[i])     pp[i] = cand_zero;
      else if (sgn[i]) pp[i] = cand_neg;
      else             pp[i] = cand_pos;
    end
  end

endmodule
