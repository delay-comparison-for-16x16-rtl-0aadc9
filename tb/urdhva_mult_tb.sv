// urdhva_mult_tb: exhaustive test of the Urdhva Tiryakbhyam multiplier.
// The 8 x 8 default and a 4 x 4 instance see every operand pair
// (65536 and 256 pairs); each product is compared with a * b. It also
// checks the 4-bit example 1101 x 1010 = 10000010 (13 x 10 = 130).
module urdhva_mult_tb;
  logic [7:0]  a8, b8;
  logic [15:0] p8;
  logic [3:0]  a4, b4;
  logic [7:0]  p4;
  int checks = 0, failures = 0;

  urdhva_mult           dut8 (.a(a8), .b(b8), .p(p8));
  urdhva_mult #(.N(4))  dut4 (.a(a4), .b(b4), .p(p4));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a8 = '0; b8 = '0;
    a4 = 4'b1101; b4 = 4'b1010;
    #1;
    checks++;
    if (p4 != 8'b1000_0010) begin
      failures++;
      $display("FAIL 1101 x 1010 -> %b", p4);
    end
    for (int v = 0; v < 65536; v++) begin
      {a8, b8} = 16'(v);
      {a4, b4} = 8'(v);
      #1;
      checks++;
      if (p8 != 16'(int'(a8) * int'(b8))) begin
        failures++;
        if (failures < 10) $display("FAIL %0d x %0d -> %0d", a8, b8, p8);
      end
      if (v < 256) begin
        checks++;
        if (p4 != 8'(int'(a4) * int'(b4))) begin
          failures++;
          $display("FAIL %0d x %0d -> %0d (N=4)", a4, b4, p4);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
