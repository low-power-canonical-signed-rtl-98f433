// csd_cell: binary-to-CSD converter for one digit position i.
//
// Looks at three neighbouring bits of the binary input, b[i+1], b[i] and
// b[i-1], and at the bypass signal p[i] coming from position i-1:
//   * p[i] = 1: the previous digit was non-zero, so this digit is forced to
//     zero (inputs bypassed) and p[i+1] = 0.
//   * p[i] = 0: the magnitude is b[i] XOR b[i-1]; the sign is b[i+1] when the
//     magnitude is 1.  p[i+1] repeats the magnitude, so a non-zero digit
//     always forces the next one to zero and no two non-zero digits touch.
// This is exactly the converter truth table of the design (patterns 001/010
// give +1, 101/110 give -1, the rest 0), taken from the design's
// converter table.  Purely combinational.
//
// Ports: p_in = p[i], b_hi/b_mid/b_lo = b[i+1]/b[i]/b[i-1];
//        x_s, x_m = sign and magnitude of digit i; p_out = p[i+1].
module csd_cell (
  input  logic p_in,
  input  logic b_hi,
  input  logic b_mid,
  input  logic b_lo,
  output logic x_s,
  output logic x_m,
  output logic p_out
);

  always_comb begin
    x_m   = ~p_in & (b_mid ^ b_lo);
    x_s   = b_hi & x_m;
    p_out = x_m;
  end

endmodule
