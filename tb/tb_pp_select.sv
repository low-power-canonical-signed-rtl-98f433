// tb_pp_select: random candidates and random sign/magnitude digits; each of
// the 17 outputs must be the candidate named by its digit (0, +A or -A).
module tb_pp_select;
  localparam int ND = 17;
  logic [31:0] cand_pos, cand_neg, cand_zero;
  logic [ND-1:0] mag, sgn;
  logic [31:0] pp [ND];
  int checks = 0, failures = 0;

  pp_select #(.NDIG(ND), .W(32)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      logic [31:0] a32;
      a32 = $urandom;
      cand_pos  = a32;
      cand_neg  = -a32;
      cand_zero = '0;
      mag = ND'($urandom);
      sgn = ND'($urandom);
      #1;
      for (int i = 0; i < ND; i++) begin
        logic [31:0] exp;
        exp = !mag[i] ? 32'd0 : (sgn[i] ? -a32 : a32);
        checks++;
        if (pp[i] != exp) begin
          failures++;
          $display("FAIL digit %0d m=%b s=%b got=%h exp=%h", i, mag[i], sgn[i], pp[i], exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
