// cla4_tb: exhaustive test of the 4-bit carry look-ahead group.
// All 512 combinations of a, b and c0. {c4, s} must equal a + b + c0;
// pg must be set exactly when a ^ b is all ones (a carry in would run
// through the whole group); gg must equal the carry out with c0 = 0.
module cla4_tb;
  logic [3:0] a, b, s;
  logic c0, c4, pg, gg;
  int checks = 0, failures = 0;

  cla4 dut (.a, .b, .c0, .s, .c4, .pg, .gg);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sum;
    for (int v = 0; v < 512; v++) begin
      {a, b, c0} = 9'(v);
      #1;
      sum = int'(a) + int'(b) + int'(c0);
      checks++;
      if ({c4, s} != 5'(sum)) begin
        failures++;
        $display("FAIL a=%h b=%h c0=%0b -> c4=%0b s=%h", a, b, c0, c4, s);
      end
      checks++;
      if (pg != ((a ^ b) == 4'hf)) begin
        failures++;
        $display("FAIL pg a=%h b=%h -> %0b", a, b, pg);
      end
      checks++;
      if (gg != (int'(a) + int'(b) > 15)) begin
        failures++;
        $display("FAIL gg a=%h b=%h -> %0b", a, b, gg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
