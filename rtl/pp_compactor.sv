// pp_compactor: keeps only the partial products of non-zero CSD digits.
//
// The NDIG weighted partial products are packed into NSEL slots: slot k
// receives the partial product of the k-th non-zero digit, counting from the
// least significant digit, and slots beyond the number of non-zero digits are
// zero.  With CSD digits never adjacent, NSEL = ceil(NDIG/2) slots always
// suffice (9 for 17 digits), so nothing is dropped.  nz_count reports how many
// digits were non-zero.
//
// Implementation: a running count of non-zero digits gives each digit its
// slot index; each slot is the OR of the partial products routed to it (at
// most one is).  Purely combinational.  Selecting the non-zero partial
// products follows the design; the in-order packing is this
// implementation's choice.
module pp_compactor #(
  parameter int unsigned NDIG = 17,
  parameter int unsigned NSEL = 9,
  parameter int unsigned W    = 32
) (
  input  logic [W-1:0]            pp_in  [NDIG],
  input  logic [NDIG-1:0]         mag,
  output logic [W-1:0]            pp_out [NSEL],
  output logic [$clog2(NDIG+1)-1:0] nz_count
);

  localparam int unsigned CW = $clog2(NDIG + 1);

  always_comb begin
    logic [CW-1:0] idx;
    idx = '0;
    for (int k = 0; k < NSEL; k++) pp_out[k] = '0;
    for (int i = 0; i < NDIG; i++) begin
      if (mag[i]) begin
        for (int k = 0; k < NSEL; k++) begin
          if (idx == CW'(k)) pp_out[k] = pp_out[k] | pp_in[i];
        end
        idx = idx + CW'(1);
      end
    end
    nz_count = idx;
  end

endmodule
