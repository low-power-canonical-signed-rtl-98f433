// csd_recoder: recodes an N-bit binary number into N+1 canonical signed
// digits (CSD), returned as separate magnitude and sign vectors.
//
// N+1 csd_cell converters are chained through their bypass signals from the
// least significant digit upward.  Digit i looks at b[i+1], b[i], b[i-1];
// b[-1] is 0 and the first bypass input is 0.  Above the top bit the input is
// sign-extended when SIGNED = 1 (two's complement, the default used by the
// multiplier) and zero-extended when SIGNED = 0.  In the signed case the top
// digit always comes out zero; in the unsigned case it can be +1.
//   value(b) = sum_i (mag[i] ? (sgn[i] ? -2^i : +2^i) : 0)
// No two adjacent digits are non-zero.  Purely combinational; the bypass
// chain is a ripple path of N+1 cells.
//
// The chaining and the 17-digit result for a 16-bit input follow the
// design; the boundary bits (b[-1], extension above the top bit) are this
// implementation's choice.
module csd_recoder #(
  parameter int unsigned N      = 16,
  parameter bit          SIGNED = 1'b1
) (
  input  logic [N-1:0] b,
  output logic [N:0]   mag,
  output logic [N:0]   sgn
);

  // Input bits with one guard bit below and two above: bx[k] = b[k-1].
  logic [N+2:0] bx;
  logic [N+1:0] p;   // bypass chain, p[i] enters cell i

  always_comb begin
    bx[0]       = 1'b0;
    bx[N:1]     = b;
    bx[N+1]     = SIGNED ? b[N-1] : 1'b0;
    bx[N+2]     = SIGNED ? b[N-1] : 1'b0;
  end

  assign p[0] = 1'b0;

  for (genvar i = 0; i <= N; i++) begin : g_cell
    csd_cell u_cell (
      .p_in  (p[i]),
      .b_hi  (bx[i+2]),
      .b_mid (bx[i+1]),
      .b_lo  (bx[i]),
      .x_s   (sgn[i]),
      .x_m   (mag[i]),
      .p_out (p[i+1])
    );
  end

endmodule
