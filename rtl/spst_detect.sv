// spst_detect: detection logic of the spurious-power-suppression (SPST) adder.
//
// It decides whether the most significant parts (MSPs) of the two operands
// can change the sum.  For each operand
//   A_AND = AND of all MSP bits  (MSP all ones)
//   A_NOR = NOR of all MSP bits  (MSP all zeros)
// When both MSPs are pure sign extension (all zeros or all ones) the MSP sum
// is one of 0...00, 0...01, 1...11 or 1...10, fixed by the two MSPs and the
// LSP carry c_lsp, and is rebuilt as {sign, ..., sign, carrctrl}:
//   carrctrl = ~c & ~Aand &  Anor &  Band & ~Bnor   (0 + -1 + 0)
//            | ~c &  Aand & ~Anor & ~Band &  Bnor   (-1 + 0 + 0)
//            |  c & ~Aand &  Anor & ~Band &  Bnor   (0 + 0 + 1)
//            |  c &  Aand & ~Anor &  Band & ~Bnor   (-1 + -1 + 1)
//   sign     = ~c & (~Aand & Anor & Band & ~Bnor
//                   | Aand & ~Anor & ~Band & Bnor
//                   | Aand & ~Anor &  Band & ~Bnor)
//            |  c & Aand & ~Anor & Band & ~Bnor
// close = 1 means the MSP adder is needed (some MSP is not a sign
// extension); close = 0 means it may be switched off.  The carrctrl and sign
// equations follow the design's Karnaugh maps; the close equation is
// written from its description ("close = 0 closes the MSP").
// Purely combinational.
module spst_detect #(
  parameter int unsigned MSP_W = 16
) (
  input  logic [MSP_W-1:0] a_msp,
  input  logic [MSP_W-1:0] b_msp,
  input  logic             c_lsp,
  output logic             close,
  output logic             carrctrl,
  output logic             sign
);

  logic a_and, a_nor, b_and, b_nor;
  logic a_zero, a_ones, b_zero, b_ones;  // exact one-hot class terms

  always_comb begin
    a_and = &a_msp;
    a_nor = ~|a_msp;
    b_and = &b_msp;
    b_nor = ~|b_msp;

    a_zero = ~a_and &  a_nor;
    a_ones =  a_and & ~a_nor;
    b_zero = ~b_and &  b_nor;
    b_ones =  b_and & ~b_nor;

    close = ~((a_and | a_nor) & (b_and | b_nor));

    carrctrl = (~c_lsp & a_zero & b_ones)
             | (~c_lsp & a_ones & b_zero)
             | ( c_lsp & a_zero & b_zero)
             | ( c_lsp & a_ones & b_ones);

    sign = (~c_lsp & ((a_zero & b_ones) | (a_ones & b_zero) | (a_ones & b_ones)))
         | ( c_lsp & a_ones & b_ones);
  end

endmodule
