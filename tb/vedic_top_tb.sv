// vedic_top_tb: end-to-end test of the three multiplier variants, at the
// top's default parameters.
//
// Each of q_rca, q_cla and q_ksa is compared with a * b. The test also
// works out, independently of the design, which carries each operand pair
// exercises, and counts them:
//   zero         an operand is zero
//   max          both operands are 16'hffff
//   urdhva_carry an 8 x 8 block has a column carry of 2 or more
//                (several crosswise products plus carry in one column)
//   adder1_carry ADDER1 carries out of its low byte (M2[7:0] + M1[15:8] > 255)
//   adder2_carry ADDER2 carries into its top byte
//                (M4[7:0] + M3[15:8] > 255)
//   adder3_carry ADDER3 carries out of its low 16 bits
//                (A2[15:0] + A1 > 65535)
// Every counter must end above zero.
module vedic_top_tb;
  localparam int unsigned RANDOM_VECTORS = 200000;
  localparam int NUM_EVENTS = 6;

  logic [15:0] a, b;
  logic [31:0] q_rca, q_cla, q_ksa;
  int checks = 0, failures = 0;
  int events [NUM_EVENTS];
  string event_name [NUM_EVENTS] = '{"zero", "max", "urdhva_carry", "adder1_carry",
                                     "adder2_carry", "adder3_carry"};

  vedic_top dut (.a, .b, .q_rca, .q_cla, .q_ksa);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Largest column carry of the column method for x * y, 8-bit operands
  function automatic int max_column_carry(input logic [7:0] x, input logic [7:0] y);
    int carry = 0, col, worst = 0;
    for (int k = 0; k < 15; k++) begin
      col = carry;
      for (int i = 0; i < 8; i++)
        if (k - i >= 0 && k - i < 8) col += int'(x[i] & y[k-i]);
      carry = col / 2;
      if (carry > worst) worst = carry;
    end
    return worst;
  endfunction

  task automatic apply(input logic [15:0] x, input logic [15:0] y);
    logic [63:0] expected;
    int m1, m2, m3, m4, a1, a2;
    a = x;
    b = y;
    #1;
    expected = 64'(a) * 64'(b);
    checks += 3;
    if (q_rca != expected[31:0]) begin
      failures++;
      $display("FAIL rca: %0d x %0d -> %0d", a, b, q_rca);
    end
    if (q_cla != expected[31:0]) begin
      failures++;
      $display("FAIL cla: %0d x %0d -> %0d", a, b, q_cla);
    end
    if (q_ksa != expected[31:0]) begin
      failures++;
      $display("FAIL ksa: %0d x %0d -> %0d", a, b, q_ksa);
    end
    m1 = int'(a[7:0])  * int'(b[7:0]);
    m2 = int'(a[15:8]) * int'(b[7:0]);
    m3 = int'(a[7:0])  * int'(b[15:8]);
    m4 = int'(a[15:8]) * int'(b[15:8]);
    a1 = m2 + (m1 >> 8);
    a2 = (m4 << 8) + m3;
    if (a == 0 || b == 0) events[0]++;
    if (a == 16'hffff && b == 16'hffff) events[1]++;
    if (max_column_carry(a[7:0], b[7:0]) >= 2) events[2]++;
    if ((m2 & 255) + (m1 >> 8) > 255) events[3]++;
    if ((m4 & 255) + (m3 >> 8) > 255) events[4]++;
    if ((a2 & 65535) + a1 > 65535) events[5]++;
  endtask

  initial begin
    foreach (events[i]) events[i] = 0;
    apply(16'd0, 16'd1234);
    apply(16'hffff, 16'hffff);
    apply(16'd123, 16'd456);
    for (int n = 0; n < RANDOM_VECTORS; n++) apply(16'($urandom), 16'($urandom));
    foreach (events[i]) begin
      $display("%-13s %0d", event_name[i], events[i]);
      checks++;
      if (events[i] == 0) begin
        failures++;
        $display("FAIL event %s never happened", event_name[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
