// tb_pp_candidate_gen: checks the {-A, 0, +A} candidates for the corner
// operands and random ones, for a signed and an unsigned instance, against
// integer arithmetic done in the testbench.
module tb_pp_candidate_gen;
  logic [15:0] a;
  logic [31:0] pos_s, neg_s, zero_s, pos_u, neg_u, zero_u;
  int checks = 0, failures = 0;
  localparam logic [15:0] CORNERS [6] = '{16'h0000, 16'h0001, 16'h7fff, 16'h8000, 16'hffff, 16'h1234};

  pp_candidate_gen #(.N(16), .W(32), .SIGNED(1'b1)) dut_s (
    .a(a), .cand_pos(pos_s), .cand_neg(neg_s), .cand_zero(zero_s));
  pp_candidate_gen #(.N(16), .W(32), .SIGNED(1'b0)) dut_u (
    .a(a), .cand_pos(pos_u), .cand_neg(neg_u), .cand_zero(zero_u));

  task automatic check(logic [31:0] got, longint exp, string tag);
    checks++;
    if (got != 32'(exp)) begin
      failures++;
      $display("FAIL %s a=%h got=%h expected=%h", tag, a, got, 32'(exp));
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2006; t++) begin
      a = (t < 6) ? CORNERS[t] : 16'($urandom);
      #1;
      check(pos_s, longint'($signed(a)), "pos_s");
      check(neg_s, -longint'($signed(a)), "neg_s");
      check(zero_s, 0, "zero_s");
      check(pos_u, longint'(a), "pos_u");
      check(neg_u, -longint'(a), "neg_u");
      check(zero_u, 0, "zero_u");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
