// tb_csd_spst_multiplier_full: signed-multiplication sweep of the multiplier
// at its default size (16 x 16 two's complement, 32-bit product).
//
// Every one of the 65536 multipliers b is combined with 64 multiplicands a
// (the corner values 0, 1, -1, 32767, -32768, 0x5555, 0xaaaa, 0x00ff and 56
// random ones), one operation per clock.  Each product is checked one clock
// later against integer multiplication, together with out_valid.  The run
// also reports how often each SPST adder had its MSP switched off.
module tb_csd_spst_multiplier_full;
  logic        clk, rst_n = 0, in_valid = 0;
  logic [15:0] a = '0, b = '0;
  logic        out_valid;
  logic [31:0] product;
  logic [3:0]  msp_active;
  logic [4:0]  nz_digits;
  int checks = 0, failures = 0;
  longint closed [4];

  csd_spst_multiplier dut (.*);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    #100000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] avals [64];
    avals[0] = 16'h0000; avals[1] = 16'h0001; avals[2] = 16'hffff; avals[3] = 16'h7fff;
    avals[4] = 16'h8000; avals[5] = 16'h5555; avals[6] = 16'haaaa; avals[7] = 16'h00ff;
    for (int i = 8; i < 64; i++) avals[i] = 16'($urandom);
    foreach (closed[k]) closed[k] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    in_valid = 1;
    for (int ai = 0; ai < 64; ai++) begin
      for (int bi = 0; bi < 65536; bi++) begin
        logic [31:0] exp_p;
        a = avals[ai];
        b = 16'(bi);
        exp_p = 32'(longint'($signed(a)) * longint'($signed(b)));
        @(posedge clk);
        #1;
        checks++;
        if (product != exp_p || !out_valid) begin
          failures++;
          if (failures < 20) $display("FAIL a=%h b=%h product=%h expected=%h", a, b, product, exp_p);
        end
        for (int k = 0; k < 4; k++) if (!msp_active[k]) closed[k]++;
        @(negedge clk);
      end
    end
    for (int k = 0; k < 4; k++)
      $display("SPST adder %0d: MSP off in %0d of %0d operations", k, closed[k], checks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
