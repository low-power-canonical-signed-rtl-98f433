// tb_spst_adder: runs the adder on a stream in which half of the operand
// pairs have a dynamic range of 16 bits (the upper 16 bits of both operands
// are all zeros or all ones, so the MSP adder can be switched off) and half
// are full 32-bit values.  New operands are applied after each falling edge; after
// the next rising edge sum must equal the 32-bit sum of the sampled pair
// (latency one clock) and msp_active must say whether the MSP was needed.
// While the MSP is off the testbench also checks that zeros reach the MSP
// adder and that the MSP operand registers did not change.  It counts
// closed and open cycles and fails if either never happened.
module tb_spst_adder;
  logic        clk, rst_n = 0;
  logic [31:0] a, b, sum;
  logic        msp_active;
  int checks = 0, failures = 0, closed = 0, opened = 0;

  spst_adder #(.W(32), .LSP_W(16)) dut (.*);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] narrow_or_wide(bit narrow);
    // narrow: upper half all zeros or all ones, lower half anything
    return narrow ? {{16{1'($urandom)}}, 16'($urandom)} : 32'($urandom);
  endfunction

  initial begin
    logic [31:0] exp_sum;
    logic        exp_active;
    logic [15:0] held_a, held_b;
    a = '0; b = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      bit narrow;
      narrow = (t < 4) ? bit'(t[0]) : bit'($urandom_range(0, 1));
      a = narrow_or_wide(narrow);
      b = narrow_or_wide(narrow);
      if (t == 2) begin a = 32'h0000_ffff; b = 32'h0000_0001; end  // closed, 0 + 0 + carry
      if (t == 3) begin a = 32'hffff_0001; b = 32'hffff_0002; end  // closed, -1 + -1, no carry
      exp_sum    = a + b;
      exp_active = !((a[31:16] == 16'h0000 || a[31:16] == 16'hffff) &&
                     (b[31:16] == 16'h0000 || b[31:16] == 16'hffff));
      held_a = dut.a_msp_q;
      held_b = dut.b_msp_q;
      @(posedge clk);
      #1;
      checks++;
      if (sum != exp_sum) begin
        failures++;
        $display("FAIL t=%0d sum=%h expected=%h", t, sum, exp_sum);
      end
      checks++;
      if (msp_active != exp_active) begin
        failures++;
        $display("FAIL t=%0d msp_active=%b expected=%b", t, msp_active, exp_active);
      end
      if (!exp_active) begin
        closed++;
        checks++;
        if (dut.msp_a_gated != '0 || dut.msp_b_gated != '0 ||
            dut.a_msp_q != held_a || dut.b_msp_q != held_b) begin
          failures++;
          $display("FAIL t=%0d MSP not frozen while closed", t);
        end
      end else begin
        opened++;
      end
      @(negedge clk);
    end
    checks++;
    if (closed == 0 || opened == 0) begin
      failures++;
      $display("FAIL closed=%0d opened=%0d", closed, opened);
    end
    $display("MSP closed in %0d of %0d cycles", closed, closed + opened);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
