// vedic_mult16_tb: self-checking test of the 16 x 16 Vedic multiplier.
// Three instances, one per adder kind (the default is Kogge-Stone), get
// the same corner and random operands; each 32-bit product is compared
// with a * b computed in 64-bit integers.
module vedic_mult16_tb;
  import vedic_pkg::*;
  localparam int unsigned RANDOM_VECTORS = 100000;

  logic [15:0] a, b;
  logic [31:0] q [3];
  int checks = 0, failures = 0;

  vedic_mult16 #(.ADDER(ADDER_RCA)) u_rca (.a, .b, .q(q[0]));
  vedic_mult16 #(.ADDER(ADDER_CLA)) u_cla (.a, .b, .q(q[1]));
  vedic_mult16                      u_ksa (.a, .b, .q(q[2]));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [15:0] x, input logic [15:0] y);
    logic [63:0] expected;
    a = x;
    b = y;
    #1;
    expected = 64'(a) * 64'(b);
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (q[k] != expected[31:0]) begin
        failures++;
        if (failures < 20) $display("FAIL kind %0d: %0d x %0d -> %0d, expected %0d", k, a, b, q[k], expected);
      end
    end
  endtask

  initial begin
    apply(16'd0, 16'd0);
    apply(16'hffff, 16'hffff);
    apply(16'hffff, 16'd1);
    apply(16'd1, 16'hffff);
    apply(16'h00ff, 16'hff00);
    apply(16'hff00, 16'h00ff);
    apply(16'h8000, 16'h8000);
    apply(16'd123, 16'd456);
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        apply(16'(1) << i, 16'hffff >> j);
    for (int n = 0; n < RANDOM_VECTORS; n++) apply(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
