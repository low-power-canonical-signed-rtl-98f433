// tb_spst_power_workload: switching-activity comparison of the SPST adder
// against a plain 32-bit ripple-carry adder on the same operand stream.
//
// Workload: 10000 operand pairs, half of them with a dynamic range of 16
// bits (two's complement values in -32768..32767, sign-extended to 32 bits)
// and half full 32-bit values, in random order, so that about half of the
// pairs need the MSP adder.  Both adders get the pairs through a register
// stage at the same clock edge (the plain adder's operands are registered
// here in the testbench).  After every edge the testbench counts bit toggles
// on the 16-bit MSP adder's operand inputs and on its sum: for the SPST adder
// the gated inputs and sum of its internal MSP adder, for the plain adder
// bits 31:16 of its registered operands and of its sum.  Toggle counts
// stand in for dynamic power of the MSP section.
//
// Checks: both adders give the same, correct sum every cycle; the SPST MSP
// section toggles less than the plain adder's; the MSP was off in 40-60 % of
// the cycles.  The reduction is printed.
module tb_spst_power_workload;
  logic        clk, rst_n = 0;
  logic [31:0] a = '0, b = '0, sum_spst, sum_rca;
  logic [31:0] a_q, b_q;
  logic        msp_active, co_rca;
  int checks = 0, failures = 0, closed = 0;
  longint tog_spst = 0, tog_rca = 0;
  localparam int n = 10000;

  spst_adder #(.W(32), .LSP_W(16)) dut (
    .clk, .rst_n, .a, .b, .sum(sum_spst), .msp_active);

  rca_adder #(.W(32)) ref_rca (.a(a_q), .b(b_q), .cin(1'b0), .sum(sum_rca), .cout(co_rca));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0;
      b_q <= '0;
    end else begin
      a_q <= a;
      b_q <= b;
    end
  end

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] p_sa, p_sb, p_ss, p_ra, p_rb, p_rs;
    logic [31:0] exp_sum;
    p_sa = '0; p_sb = '0; p_ss = '0; p_ra = '0; p_rb = '0; p_rs = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < n; t++) begin
      if ($urandom_range(0, 1) == 0) begin
        a = 32'($signed(16'($urandom)));
        b = 32'($signed(16'($urandom)));
      end else begin
        a = $urandom;
        b = $urandom;
      end
      exp_sum = a + b;
      @(posedge clk);
      #1;
      checks++;
      if (sum_spst != exp_sum || sum_rca != exp_sum) begin
        failures++;
        if (failures < 20) $display("FAIL t=%0d spst=%h rca=%h expected=%h", t, sum_spst, sum_rca, exp_sum);
      end
      if (!msp_active) closed++;
      tog_spst += $countones(dut.msp_a_gated ^ p_sa) + $countones(dut.msp_b_gated ^ p_sb)
                + $countones(dut.msp_sum ^ p_ss);
      tog_rca  += $countones(a_q[31:16] ^ p_ra) + $countones(b_q[31:16] ^ p_rb)
                + $countones(sum_rca[31:16] ^ p_rs);
      p_sa = dut.msp_a_gated; p_sb = dut.msp_b_gated; p_ss = dut.msp_sum;
      p_ra = a_q[31:16];      p_rb = b_q[31:16];      p_rs = sum_rca[31:16];
      @(negedge clk);
    end
    $display("MSP off in %0d of %0d cycles", closed, n);
    $display("MSP-section toggles: SPST %0d, ripple-carry %0d, reduction %0d %%",
             tog_spst, tog_rca, 100 - (100 * tog_spst) / tog_rca);
    checks++;
    if (!(tog_spst < tog_rca)) begin
      failures++;
      $display("FAIL SPST MSP section does not toggle less");
    end
    checks++;
    if (closed < n * 4 / 10 || closed > n * 6 / 10) begin
      failures++;
      $display("FAIL MSP off fraction out of range");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
