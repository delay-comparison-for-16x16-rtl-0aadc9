// generic_adder_tb: checks that every KIND of generic_adder adds.
// Six instances (ripple carry, carry look-ahead and Kogge-Stone, each at
// 16 and 24 bits, the widths the multiplier uses) get the same random and
// corner operands; each {cout, s} is compared with a + b + cin.
module generic_adder_tb;
  import vedic_pkg::*;
  localparam int unsigned RANDOM_VECTORS = 20000;

  logic [15:0] a16, b16;
  logic [23:0] a24, b24;
  logic cin;
  logic [16:0] r16 [3];
  logic [24:0] r24 [3];
  int checks = 0, failures = 0;

  generic_adder                                  u_def   (.a(a16), .b(b16), .cin, .s(r16[2][15:0]), .cout(r16[2][16]));
  generic_adder #(.WIDTH(16), .KIND(ADDER_RCA)) u_rca16 (.a(a16), .b(b16), .cin, .s(r16[0][15:0]), .cout(r16[0][16]));
  generic_adder #(.WIDTH(16), .KIND(ADDER_CLA)) u_cla16 (.a(a16), .b(b16), .cin, .s(r16[1][15:0]), .cout(r16[1][16]));
  generic_adder #(.WIDTH(24), .KIND(ADDER_RCA)) u_rca24 (.a(a24), .b(b24), .cin, .s(r24[0][23:0]), .cout(r24[0][24]));
  generic_adder #(.WIDTH(24), .KIND(ADDER_CLA)) u_cla24 (.a(a24), .b(b24), .cin, .s(r24[1][23:0]), .cout(r24[1][24]));
  generic_adder #(.WIDTH(24), .KIND(ADDER_KSA)) u_ksa24 (.a(a24), .b(b24), .cin, .s(r24[2][23:0]), .cout(r24[2][24]));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [23:0] x, input logic [23:0] y, input logic c);
    logic [24:0] e16, e24;
    a16 = x[15:0]; b16 = y[15:0];
    a24 = x;       b24 = y;
    cin = c;
    #1;
    e16 = 25'(a16) + 25'(b16) + 25'(cin);
    e24 = 25'(a24) + 25'(b24) + 25'(cin);
    for (int k = 0; k < 3; k++) begin
      checks += 2;
      if (r16[k] != e16[16:0]) begin
        failures++;
        $display("FAIL kind %0d W=16 a=%h b=%h cin=%0b -> %h", k, a16, b16, cin, r16[k]);
      end
      if (r24[k] != e24) begin
        failures++;
        $display("FAIL kind %0d W=24 a=%h b=%h cin=%0b -> %h", k, a24, b24, cin, r24[k]);
      end
    end
  endtask

  initial begin
    logic [23:0] x;
    apply('0, '0, 1'b0);
    apply('1, '1, 1'b1);
    apply('1, 24'd1, 1'b0);
    apply('1, '0, 1'b1);
    for (int n = 0; n < RANDOM_VECTORS; n++) begin
      x = 24'($urandom);
      apply(x, (n % 4 == 0) ? ~x : 24'($urandom), 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
