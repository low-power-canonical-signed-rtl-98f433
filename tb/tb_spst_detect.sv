// tb_spst_detect: drives every pairing of MSP classes (all zeros, all ones,
// and several values that are neither) with both LSP carries.  close must be
// 0 exactly when both MSPs are all zeros or all ones; whenever close is 0,
// {sign x15, carrctrl} must equal the low 16 bits of a_msp + b_msp + c_lsp,
// which the testbench computes with integer addition.
module tb_spst_detect;
  logic [15:0] a_msp, b_msp;
  logic        c_lsp, close, carrctrl, sign;
  int checks = 0, failures = 0, closed_cases = 0;

  spst_detect #(.MSP_W(16)) dut (.*);

  localparam int NV = 8;
  logic [15:0] vals [NV] = '{16'h0000, 16'hffff, 16'h0001, 16'hfffe, 16'h8000, 16'h7fff, 16'h1234, 16'hff00};

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < NV * NV * 2 + 400; t++) begin
      logic exp_close;
      logic [15:0] exp_msp;
      if (t < NV * NV * 2) begin
        a_msp = vals[t / (NV * 2)];
        b_msp = vals[(t / 2) % NV];
        c_lsp = 1'(t);
      end else begin
        a_msp = 1'($urandom) ? {16{1'($urandom)}} : 16'($urandom);
        b_msp = 1'($urandom) ? {16{1'($urandom)}} : 16'($urandom);
        c_lsp = 1'($urandom);
      end
      #1;
      exp_close = !((a_msp == 16'h0000 || a_msp == 16'hffff) && (b_msp == 16'h0000 || b_msp == 16'hffff));
      exp_msp   = a_msp + b_msp + 16'(c_lsp);
      checks++;
      if (close != exp_close) begin
        failures++;
        $display("FAIL close a=%h b=%h c=%b close=%b", a_msp, b_msp, c_lsp, close);
      end
      if (!exp_close) begin
        closed_cases++;
        checks++;
        if ({{15{sign}}, carrctrl} != exp_msp) begin
          failures++;
          $display("FAIL rebuild a=%h b=%h c=%b sign=%b carrctrl=%b exp=%h", a_msp, b_msp, c_lsp, sign, carrctrl, exp_msp);
        end
      end
    end
    checks++;
    if (closed_cases < 8) begin
      failures++;
      $display("FAIL only %0d closed cases", closed_cases);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
