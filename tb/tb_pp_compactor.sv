// tb_pp_compactor: random magnitude patterns with no two adjacent ones (as a
// CSD recoding produces), including, every 100th case, the alternating
// pattern with 9 non-zero digits, and random partial products.  The testbench lists the
// non-zero digits in order and expects slot k to hold the k-th one, the
// remaining slots to be zero and nz_count to be the number of ones.
module tb_pp_compactor;
  localparam int ND = 17, NS = 9;
  logic [31:0] pp_in [ND];
  logic [ND-1:0] mag;
  logic [31:0] pp_out [NS];
  logic [4:0]  nz_count;
  int checks = 0, failures = 0, full_cases = 0;

  pp_compactor #(.NDIG(ND), .NSEL(NS), .W(32)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      logic [31:0] exp [NS];
      int n;
      if (t % 100 == 0) mag = 17'b1_0101_0101_0101_0101;
      else if (t == 1)  mag = '0;
      else begin
        mag = ND'($urandom);
        mag = mag & ~(mag << 1);   // clear any digit whose lower neighbour is set
      end
      for (int i = 0; i < ND; i++) pp_in[i] = $urandom | 32'h1;
      #1;
      n = 0;
      for (int k = 0; k < NS; k++) exp[k] = '0;
      for (int i = 0; i < ND; i++)
        if (mag[i]) begin
          exp[n] = pp_in[i];
          n++;
        end
      if (n == NS) full_cases++;
      for (int k = 0; k < NS; k++) begin
        checks++;
        if (pp_out[k] != exp[k]) begin
          failures++;
          $display("FAIL mag=%b slot %0d got=%h exp=%h", mag, k, pp_out[k], exp[k]);
        end
      end
      checks++;
      if (nz_count != 5'(n)) begin
        failures++;
        $display("FAIL mag=%b nz_count=%0d exp=%0d", mag, nz_count, n);
      end
    end
    checks++;
    if (full_cases == 0) begin
      failures++;
      $display("FAIL no case filled all nine slots");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
