// tb_csd_spst_multiplier: end-to-end test of the CSD / SPST multiplier.
//
// Two instances share the stimulus: the default (signed) multiplier and an
// unsigned one (SIGNED = 0).  Operands are applied after each falling edge
// with in_valid sometimes low; after the next rising edge each product is
// compared with integer multiplication, out_valid with the delayed in_valid
// (latency one clock, one operation per clock), and nz_digits with the
// number of non-zero digits of the operand's non-adjacent form, computed here
// by the textbook digit-by-digit method.
//
// Mechanisms counted, each of which must occur at least once:
//   spst_closed[k] / spst_open[k]  SPST adder k with its MSP off / on
//   bypass        a run of ones in b recoded with fewer non-zero digits
//   ninth_slot    nine non-zero digits, so the ninth partial product is used
//                 (possible only for unsigned operands)
//   idle          a cycle with in_valid low
module tb_csd_spst_multiplier;
  logic        clk, rst_n = 0, in_valid = 0;
  logic [15:0] a = '0, b = '0;
  logic        ov_s, ov_u;
  logic [31:0] p_s, p_u;
  logic [3:0]  act_s, act_u;
  logic [4:0]  nz_s, nz_u;
  int checks = 0, failures = 0;
  int spst_closed [4], spst_open [4];
  int bypass = 0, ninth_slot = 0, idle = 0, ops = 0;
  localparam logic [15:0] CORNER [8] = '{16'h0000, 16'h0001, 16'hffff, 16'h7fff,
                                         16'h8000, 16'h5555, 16'haaaa, 16'h00ff};

  csd_spst_multiplier dut_s (
    .clk, .rst_n, .in_valid, .a, .b,
    .out_valid(ov_s), .product(p_s), .msp_active(act_s), .nz_digits(nz_s));

  csd_spst_multiplier #(.SIGNED(1'b0)) dut_u (
    .clk, .rst_n, .in_valid, .a, .b,
    .out_valid(ov_u), .product(p_u), .msp_active(act_u), .nz_digits(nz_u));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  // Number of non-zero digits of the non-adjacent form of x.
  function automatic int naf_weight(longint x);
    int n = 0;
    while (x != 0) begin
      if (x[0]) begin
        longint d = (x[1] == 1'b1) ? -1 : 1;   // x mod 4 == 3 -> -1, == 1 -> +1
        x = x - d;
        n++;
      end
      x = x >>> 1;
    end
    return n;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s a=%h b=%h", what, a, b);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (spst_closed[k]) begin spst_closed[k] = 0; spst_open[k] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20000; t++) begin
      longint exp_s, exp_u;
      logic   v;
      v = (t < 64) ? 1'b1 : ($urandom_range(0, 7) != 0);
      if (t < 64) begin
        a = CORNER[t / 8];
        b = CORNER[t % 8];
      end else begin
        a = 16'($urandom);
        // mix wide and narrow multipliers so that SPST adders see both
        b = (t % 3 == 0) ? 16'($signed(8'($urandom))) : 16'($urandom);
        if (t % 5 == 0) a = 16'($signed(6'($urandom)));
      end
      in_valid = v;
      exp_s = longint'($signed(a)) * longint'($signed(b));
      exp_u = longint'(a) * longint'(b);
      @(posedge clk);
      #1;
      check(ov_s == v && ov_u == v, "out_valid");
      if (!v) idle++;
      else begin
        ops++;
        check(p_s == 32'(exp_s), "signed product");
        check(p_u == 32'(exp_u), "unsigned product");
        check(int'(nz_s) == naf_weight(longint'($signed(b))), "signed digit count");
        check(int'(nz_u) == naf_weight(longint'(b)), "unsigned digit count");
        if (int'(nz_u) < $countones(b)) bypass++;
        if (nz_u == 5'd9) ninth_slot++;
        for (int k = 0; k < 4; k++) begin
          if (act_s[k]) spst_open[k]++; else spst_closed[k]++;
        end
      end
      @(negedge clk);
    end
    in_valid = 0;
    for (int k = 0; k < 4; k++) begin
      $display("SPST adder %0d: MSP off %0d, on %0d", k, spst_closed[k], spst_open[k]);
      check(spst_closed[k] > 0, "SPST MSP never switched off");
      check(spst_open[k] > 0, "SPST MSP never switched on");
    end
    $display("ops=%0d idle=%0d bypass=%0d ninth_slot=%0d", ops, idle, bypass, ninth_slot);
    check(bypass > 0, "bypass never happened");
    check(ninth_slot > 0, "ninth partial product never used");
    check(idle > 0, "no idle cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
