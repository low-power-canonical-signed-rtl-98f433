// tb_csd_cell: exhaustive check of the one-digit binary-to-CSD converter.
// All 16 combinations of (p_in, b[i+1], b[i], b[i-1]) are applied and the
// outputs compared with the converter truth table written out below as a
// digit value (-1, 0, +1).  A watchdog ends the run if it ever hangs.
module tb_csd_cell;
  logic p_in, b_hi, b_mid, b_lo;
  logic x_s, x_m, p_out;
  int checks = 0, failures = 0;

  csd_cell dut (.*);

  // Expected digit for p_in = 0, indexed by {b[i+1], b[i], b[i-1]}.
  function automatic int expected_digit(logic [2:0] bits);
    case (bits)
      3'b001, 3'b010: return 1;
      3'b101, 3'b110: return -1;
      default:        return 0;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int exp_d, got_d;
      {p_in, b_hi, b_mid, b_lo} = 4'(v);
      #1;
      exp_d = p_in ? 0 : expected_digit({b_hi, b_mid, b_lo});
      got_d = x_m ? (x_s ? -1 : 1) : 0;
      checks++;
      if (got_d != exp_d || (!x_m && x_s)) begin
        failures++;
        $display("FAIL p=%b b=%b%b%b digit=%0d (s=%b m=%b) expected %0d", p_in, b_hi, b_mid, b_lo, got_d, x_s, x_m, exp_d);
      end
      checks++;
      if (p_out != (exp_d != 0)) begin
        failures++;
        $display("FAIL p=%b b=%b%b%b p_out=%b", p_in, b_hi, b_mid, b_lo, p_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
