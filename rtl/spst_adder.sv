// spst_adder: W-bit adder with spurious power suppression (SPST).
//
// The adder is split into an LSP_W-bit least significant part (LSP) and a
// (W-LSP_W)-bit most significant part (MSP).  When both operand MSPs are only
// sign extension (all zeros or all ones), the MSP adder is switched off: its
// operand registers keep their old contents (no toggling) and AND gates feed
// it zeros, while the MSP of the sum is rebuilt from the detection logic as
// {sign, ..., sign, carrctrl}.  Otherwise the MSP adder computes normally
// with the LSP carry as its carry in.
//
// Timing (one clock of latency):
//   before the rising edge  LSP adder and detection logic work on a, b;
//   at the rising edge      LSP sum, LSP carry, close, carrctrl and sign are
//                           registered, and the MSP operands are loaded only
//                           if close = 1 (load enable = close);
//   after the edge          the MSP adder (inputs ANDed with the registered
//                           close) and the sign-extension mux form sum.
// So sum always equals the low W bits of a + b as sampled at the last rising
// edge.  msp_active shows whether the MSP adder computes in this cycle.
// rst_n is an asynchronous active-low reset clearing all registers.
//
// The split, the detection logic, the gated MSP operands and a sum that is
// complete at the rising edge follow the design.  Using edge-triggered
// registers with a load enable for its MSP "latches", registering the LSP
// side at the same edge, and the reset are this implementation's choices.
module spst_adder #(
  parameter int unsigned W     = 32,
  parameter int unsigned LSP_W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum,
  output logic         msp_active
);

  localparam int unsigned MSP_W = W - LSP_W;

  // ---- before the edge: LSP adder and detection ----
  logic [LSP_W-1:0] lsp_sum;
  logic             c_lsp;
  logic             close, carrctrl, sign;

  rca_adder #(.W(LSP_W)) u_lsp_adder (
    .a    (a[LSP_W-1:0]),
    .b    (b[LSP_W-1:0]),
    .cin  (1'b0),
    .sum  (lsp_sum),
    .cout (c_lsp)
  );

  spst_detect #(.MSP_W(MSP_W)) u_detect (
    .a_msp    (a[W-1:LSP_W]),
    .b_msp    (b[W-1:LSP_W]),
    .c_lsp    (c_lsp),
    .close    (close),
    .carrctrl (carrctrl),
    .sign     (sign)
  );

  // ---- registers ----
  logic [LSP_W-1:0] lsp_sum_q;
  logic             c_lsp_q, close_q, carrctrl_q, sign_q;
  logic [MSP_W-1:0] a_msp_q, b_msp_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lsp_sum_q  <= '0;
      c_lsp_q    <= 1'b0;
      close_q    <= 1'b0;
      carrctrl_q <= 1'b0;
      sign_q     <= 1'b0;
    end else begin
      lsp_sum_q  <= lsp_sum;
      c_lsp_q    <= c_lsp;
      close_q    <= close;
      carrctrl_q <= carrctrl;
      sign_q     <= sign;
    end
  end

  // MSP operand "latches": loaded only when the MSP is needed, frozen else.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_msp_q <= '0;
      b_msp_q <= '0;
    end else if (close) begin
      a_msp_q <= a[W-1:LSP_W];
      b_msp_q <= b[W-1:LSP_W];
    end
  end

  // ---- after the edge: gated MSP adder and sign-extension circuit ----
  logic [MSP_W-1:0] msp_a_gated, msp_b_gated, msp_sum;
  logic             msp_cout;

  assign msp_a_gated = a_msp_q & {MSP_W{close_q}};
  assign msp_b_gated = b_msp_q & {MSP_W{close_q}};

  rca_adder #(.W(MSP_W)) u_msp_adder (
    .a    (msp_a_gated),
    .b    (msp_b_gated),
    .cin  (c_lsp_q & close_q),
    .sum  (msp_sum),
    .cout (msp_cout)
  );

  always_comb begin
    if (close_q) sum = {msp_sum, lsp_sum_q};
    else         sum = {{(MSP_W-1){sign_q}}, carrctrl_q, lsp_sum_q};
  end

  assign msp_active = close_q;

endmodule
