// ksa_adder_tb: self-checking test of the Kogge-Stone adder.
// Two instances, the 16-bit default and a 24-bit one, get the same
// random and corner operands (all zeros, all ones, a carry that runs the
// full length, alternating bits) with both carry-in values. {cout, s} is
// compared with a + b + cin computed in 64-bit integers. The test also
// counts operands whose carry propagates through every bit, and fails if
// none was seen.
module ksa_adder_tb;
  localparam int unsigned W1 = 16;
  localparam int unsigned W2 = 24;
  localparam int unsigned RANDOM_VECTORS = 20000;

  logic [W1-1:0] a1, b1, s1;
  logic [W2-1:0] a2, b2, s2;
  logic cin, cout1, cout2;
  int checks = 0, failures = 0;
  int full_propagate = 0;

  ksa_adder              dut1 (.a(a1), .b(b1), .cin, .s(s1), .cout(cout1));
  ksa_adder #(.WIDTH(W2)) dut2 (.a(a2), .b(b2), .cin, .s(s2), .cout(cout2));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [63:0] x, input logic [63:0] y, input logic c);
    logic [63:0] exp1, exp2;
    a1 = x[W1-1:0]; b1 = y[W1-1:0];
    a2 = x[W2-1:0]; b2 = y[W2-1:0];
    cin = c;
    #1;
    exp1 = 64'(a1) + 64'(b1) + 64'(cin);
    exp2 = 64'(a2) + 64'(b2) + 64'(cin);
    checks++;
    if ({cout1, s1} != exp1[W1:0]) begin
      failures++;
      $display("FAIL W=%0d a=%h b=%h cin=%0b -> %h, expected %h", W1, a1, b1, cin, {cout1, s1}, exp1[W1:0]);
    end
    checks++;
    if ({cout2, s2} != exp2[W2:0]) begin
      failures++;
      $display("FAIL W=%0d a=%h b=%h cin=%0b -> %h, expected %h", W2, a2, b2, cin, {cout2, s2}, exp2[W2:0]);
    end
    if ((a1 ^ b1) == '1 && cin) full_propagate++;
  endtask

  initial begin
    logic [63:0] x, y;
    for (int c = 0; c < 2; c++) begin
      apply('0, '0, 1'(c));
      apply('1, '0, 1'(c));
      apply('1, '1, 1'(c));
      apply('1, 64'd1, 1'(c));
      apply({32{2'b01}}, {32{2'b10}}, 1'(c));
      apply({32{2'b10}}, {32{2'b10}}, 1'(c));
      apply({16{4'h5}}, {16{4'ha}}, 1'(c));
    end
    for (int n = 0; n < RANDOM_VECTORS; n++) begin
      x = {$urandom, $urandom};
      y = {$urandom, $urandom};
      if (n % 8 == 0) y = ~x;  // every bit propagates
      apply(x, y, 1'($urandom));
    end
    checks++;
    if (full_propagate == 0) begin
      failures++;
      $display("FAIL no operand propagated a carry through all bits");
    end
    $display("full-length carry propagations: %0d", full_propagate);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
