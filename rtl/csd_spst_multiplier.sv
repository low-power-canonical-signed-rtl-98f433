// csd_spst_multiplier: low-power N x N multiplier built from canonical
// signed digit (CSD) recoding and spurious-power-suppression (SPST) adders.
//
// Datapath (default N = 16, W = 2N = 32):
//   1. csd_recoder turns the multiplier b into N+1 = 17 CSD digits
//      (magnitude and sign bits).  No two adjacent digits are non-zero, so at
//      most 9 digits are non-zero.
//   2. pp_candidate_gen forms the candidates +A, 0, -A of the multiplicand a,
//      pp_select picks one per digit, and pp_shifter weights partial product
//      i by 2^i.
//   3. pp_compactor keeps only the partial products of non-zero digits, in
//      digit order, in NSEL = 9 slots (unused slots are zero).
//   4. Slots 0..7 are added pairwise by four spst_adder instances; each one
//      switches its upper 16-bit half off whenever both of its operands'
//      upper halves are sign extension, which is common because most partial
//      products are narrow.
//   5. Conventional ripple-carry adders finish the sum: (s0 + s1), (s2 + s3),
//      their sum, and finally the ninth slot.
//
// Timing: the only registers sit inside the SPST adders (plus the ninth
// slot, the valid bit and the digit count registered beside them).  a and b
// are sampled at a rising edge and product is valid, combinationally, after
// that edge: latency 1 clock, one new operation per clock.  in_valid is
// delayed to out_valid.  msp_active shows which SPST adders have their MSP
// switched on in the current cycle; nz_digits is the number of non-zero CSD
// digits of the operation currently shown.  rst_n is an asynchronous
// active-low reset.
//
// SIGNED = 1 (default) multiplies two's complement operands; SIGNED = 0
// multiplies unsigned ones.  In the signed case at most 8 digits are
// non-zero and the ninth slot stays zero; it is needed for unsigned operands.
//
// The block structure (candidates, CSD recoding, selection, shifting, nine
// selected partial products, four SPST adders and conventional adders)
// follows the design.  Where the ninth partial product enters the adder
// tree, the register placement, the valid/status ports and the unsigned
// option are this implementation's choices.
module csd_spst_multiplier
  import csd_mult_pkg::*;
#(
  parameter int unsigned N      = OP_W,
  parameter int unsigned W      = 2 * N,
  parameter int unsigned NSEL_P = (N == OP_W) ? NSEL : (N + 2) / 2,
  parameter bit          SIGNED = 1'b1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic [N-1:0]               a,
  input  logic [N-1:0]               b,
  output logic                       out_valid,
  output logic [W-1:0]               product,
  output logic [NSPST-1:0]           msp_active,
  output logic [$clog2(N+2)-1:0]     nz_digits
);

  localparam int unsigned ND  = N + 1;
  localparam int unsigned CW  = $clog2(ND + 1);
  localparam int unsigned LSP = W / 2;

  // ---- CSD recoding of b ----
  logic [ND-1:0] mag, sgn;

  csd_recoder #(.N(N), .SIGNED(SIGNED)) u_recoder (
    .b   (b),
    .mag (mag),
    .sgn (sgn)
  );

  // ---- partial product candidates, selection, shifting ----
  logic [W-1:0] cand_pos, cand_neg, cand_zero;
  logic [W-1:0] pp_sel   [ND];
  logic [W-1:0] pp_shift [ND];
  logic [W-1:0] pp_nz    [NSEL_P];
  logic [CW-1:0] nz_count;

  pp_candidate_gen #(.N(N), .W(W), .SIGNED(SIGNED)) u_cand (
    .a         (a),
    .cand_pos  (cand_pos),
    .cand_neg  (cand_neg),
    .cand_zero (cand_zero)
  );

  pp_select #(.NDIG(ND), .W(W)) u_select (
    .cand_pos  (cand_pos),
    .cand_neg  (cand_neg),
    .cand_zero (cand_zero),
    .mag       (mag),
    .sgn       (sgn),
    .pp        (pp_sel)
  );

  pp_shifter #(.NDIG(ND), .W(W)) u_shift (
    .pp_in  (pp_sel),
    .pp_out (pp_shift)
  );

  pp_compactor #(.NDIG(ND), .NSEL(NSEL_P), .W(W)) u_compact (
    .pp_in    (pp_shift),
    .mag      (mag),
    .pp_out   (pp_nz),
    .nz_count (nz_count)
  );

  // ---- four SPST adders on slots 0..7 ----
  logic [W-1:0] spst_sum [NSPST];

  for (genvar k = 0; k < NSPST; k++) begin : g_spst
    spst_adder #(.W(W), .LSP_W(LSP)) u_spst (
      .clk        (clk),
      .rst_n      (rst_n),
      .a          (pp_nz[2*k]),
      .b          (pp_nz[2*k+1]),
      .sum        (spst_sum[k]),
      .msp_active (msp_active[k])
    );
  end

  // ---- ninth slot, valid and digit count registered beside the SPST adders ----
  logic [W-1:0]  pp_last_q;
  logic          valid_q;
  logic [CW-1:0] nz_count_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pp_last_q  <= '0;
      valid_q    <= 1'b0;
      nz_count_q <= '0;
    end else begin
      pp_last_q  <= pp_nz[NSEL_P-1];
      valid_q    <= in_valid;
      nz_count_q <= nz_count;
    end
  end

  // ---- conventional adders ----
  logic [W-1:0] sum01, sum23, sum0123;
  logic         co01, co23, co0123, co_final;

  rca_adder #(.W(W)) u_add01 (
    .a(spst_sum[0]), .b(spst_sum[1]), .cin(1'b0), .sum(sum01), .cout(co01)
  );
  rca_adder #(.W(W)) u_add23 (
    .a(spst_sum[2]), .b(spst_sum[3]), .cin(1'b0), .sum(sum23), .cout(co23)
  );
  rca_adder #(.W(W)) u_add0123 (
    .a(sum01), .b(sum23), .cin(1'b0), .sum(sum0123), .cout(co0123)
  );
  rca_adder #(.W(W)) u_add_final (
    .a(sum0123), .b(pp_last_q), .cin(1'b0), .sum(product), .cout(co_final)
  );

  assign out_valid = valid_q;
  assign nz_digits = nz_count_q;

endmodule
