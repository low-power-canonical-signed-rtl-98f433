// tb_pp_shifter: random partial products; output i must equal input i
// multiplied by 2^i modulo 2^32.
module tb_pp_shifter;
  localparam int ND = 17;
  logic [31:0] pp_in [ND];
  logic [31:0] pp_out [ND];
  int checks = 0, failures = 0;

  pp_shifter #(.NDIG(ND), .W(32)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < ND; i++) pp_in[i] = $urandom;
      #1;
      for (int i = 0; i < ND; i++) begin
        longint unsigned exp;
        exp = longint'(pp_in[i]) * (longint'(1) << i);
        checks++;
        if (pp_out[i] != 32'(exp)) begin
          failures++;
          $display("FAIL i=%0d in=%h out=%h", i, pp_in[i], pp_out[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
