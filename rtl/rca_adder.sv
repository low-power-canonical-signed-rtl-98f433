// rca_adder: W-bit ripple-carry adder.
//
// A chain of W full adders: sum[i] = a[i] ^ b[i] ^ c[i] and
// c[i+1] = majority(a[i], b[i], c[i]), with c[0] = cin and cout = c[W].
// This is the plain ("conventional") adder of the design: it is the LSP and
// MSP adder inside each SPST adder and the adder that sums the SPST results.
// Purely combinational; the delay grows linearly with W.  The design names
// only a conventional adder and compares against a ripple-carry adder; the
// ripple-carry structure is this implementation's choice.
module rca_adder #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_fa
    assign sum[i] = a[i] ^ b[i] ^ c[i];
    assign c[i+1] = (a[i] & b[i]) | (a[i] & c[i]) | (b[i] & c[i]);
  end

  assign cout = c[W];

endmodule
