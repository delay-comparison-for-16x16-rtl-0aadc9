// full_adder_tb: exhaustive test of the one-bit full adder.
// All eight input combinations; sum, carry, propagate and generate are
// compared with the integer sum a + b + cin and with a ^ b, a & b.
module full_adder_tb;
  logic a, b, cin, s, cout, p, g;
  int checks = 0, failures = 0;

  full_adder dut (.a, .b, .cin, .s, .cout, .p, .g);

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v);
      #1;
      checks++;
      if ({cout, s} != 2'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        $display("FAIL sum a=%0b b=%0b cin=%0b -> cout=%0b s=%0b", a, b, cin, cout, s);
      end
      checks++;
      if (p != (a ^ b) || g != (a & b)) begin
        failures++;
        $display("FAIL p/g a=%0b b=%0b -> p=%0b g=%0b", a, b, p, g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
