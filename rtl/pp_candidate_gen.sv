// pp_candidate_gen: builds the three partial-product candidates {-A, 0, +A}.
//
// The N-bit multiplicand is extended to W bits (sign extension when
// SIGNED = 1, zero extension otherwise) to give +A; -A is its W-bit two's
// complement (bitwise inversion plus one); the zero candidate is all zeros.
// Every CSD digit later picks one of these three words.  Purely
// combinational.  The three candidates and their 32-bit width follow the
// design; the negation circuit is this implementation's choice.
module pp_candidate_gen #(
  parameter int unsigned N      = 16,
  parameter int unsigned W      = 32,
  parameter bit          SIGNED = 1'b1
) (
  input  logic [N-1:0] a,
  output logic [W-1:0] cand_pos,
  output logic [W-1:0] cand_neg,
  output logic [W-1:0] cand_zero
);

  always_comb begin
    cand_pos  = {{(W-N){SIGNED & a[N-1]}}, a};
    cand_neg  = ~cand_pos + W'(1);
    cand_zero = '0;
  end

endmodule
