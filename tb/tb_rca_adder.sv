// tb_rca_adder: corner and random operands, both carry-in values, for a
// 32-bit and a 16-bit ripple-carry adder; {cout, sum} is compared with
// a + b + cin computed in 64-bit integers.
module tb_rca_adder;
  logic [31:0] a, b, s32;
  logic [15:0] s16;
  logic        cin, co32, co16;
  int checks = 0, failures = 0;

  rca_adder #(.W(32)) dut32 (.a(a), .b(b), .cin(cin), .sum(s32), .cout(co32));
  rca_adder #(.W(16)) dut16 (.a(a[15:0]), .b(b[15:0]), .cin(cin), .sum(s16), .cout(co16));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5000; t++) begin
      longint unsigned e32, e16;
      case (t)
        0: begin a = '1; b = '0; cin = 1; end
        1: begin a = '1; b = '1; cin = 1; end
        2: begin a = 32'h8000_0000; b = 32'h8000_0000; cin = 0; end
        3: begin a = '0; b = '0; cin = 0; end
        default: begin a = $urandom; b = $urandom; cin = 1'($urandom); end
      endcase
      #1;
      e32 = longint'(a) + longint'(b) + longint'(cin);
      e16 = longint'(a[15:0]) + longint'(b[15:0]) + longint'(cin);
      checks++;
      if ({co32, s32} != 33'(e32)) begin
        failures++;
        $display("FAIL32 %h+%h+%b = %b_%h", a, b, cin, co32, s32);
      end
      checks++;
      if ({co16, s16} != 17'(e16)) begin
        failures++;
        $display("FAIL16 %h+%h+%b = %b_%h", a[15:0], b[15:0], cin, co16, s16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
