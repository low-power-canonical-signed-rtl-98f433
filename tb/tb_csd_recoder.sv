// tb_csd_recoder: exhaustive check of the 16-bit binary-to-CSD recoder.
// Every 16-bit input is applied to a signed and to an unsigned recoder.  For
// each the digits are summed back into a value (sum of +-2^i) and compared
// with the two's complement / unsigned reading of the input; the tb also
// checks that no two adjacent digits are non-zero, that the sign bit is
// never set on a zero digit, and that at most 9 digits are non-zero.  It
// counts inputs whose recoding needs the top (17th) digit, which only the
// unsigned recoder can produce.
module tb_csd_recoder;
  localparam int N = 16;
  logic [N-1:0] b;
  logic [N:0]   mag_s, sgn_s, mag_u, sgn_u;
  int checks = 0, failures = 0, top_digit_used = 0;

  csd_recoder #(.N(N), .SIGNED(1'b1)) dut_s (.b(b), .mag(mag_s), .sgn(sgn_s));
  csd_recoder #(.N(N), .SIGNED(1'b0)) dut_u (.b(b), .mag(mag_u), .sgn(sgn_u));

  function automatic longint csd_value(logic [N:0] mag, logic [N:0] sgn);
    longint v = 0;
    for (int i = 0; i <= N; i++)
      if (mag[i]) v += sgn[i] ? -(longint'(1) << i) : (longint'(1) << i);
    return v;
  endfunction

  task automatic check_form(logic [N:0] mag, logic [N:0] sgn, string tag);
    checks++;
    if ((mag & (mag >> 1)) != '0 || (sgn & ~mag) != '0 || $countones(mag) > 9) begin
      failures++;
      if (failures < 20) $display("FAIL %s form b=%h mag=%b sgn=%b", tag, b, mag, sgn);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << N); v++) begin
      b = N'(v);
      #1;
      checks++;
      if (csd_value(mag_s, sgn_s) != longint'($signed(b))) begin
        failures++;
        if (failures < 20) $display("FAIL signed b=%h value=%0d", b, csd_value(mag_s, sgn_s));
      end
      checks++;
      if (csd_value(mag_u, sgn_u) != longint'(v)) begin
        failures++;
        if (failures < 20) $display("FAIL unsigned b=%h value=%0d", b, csd_value(mag_u, sgn_u));
      end
      check_form(mag_s, sgn_s, "signed");
      check_form(mag_u, sgn_u, "unsigned");
      if (mag_u[N]) top_digit_used++;
    end
    checks++;
    if (top_digit_used == 0) begin
      failures++;
      $display("FAIL top digit never used");
    end
    $display("unsigned inputs using digit 16: %0d", top_digit_used);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
