// vedic_mult16: 16 x 16 unsigned Vedic multiplier.
//
// Each operand is split into bytes and the four byte-by-byte products come
// from four 8 x 8 Urdhva Tiryakbhyam multipliers:
//   M1 = a[7:0]  * b[7:0]      M2 = a[15:8] * b[7:0]
//   M3 = a[7:0]  * b[15:8]     M4 = a[15:8] * b[15:8]
// An addition tree of three adders aligns and sums them:
//   ADDER1 (16 bit): A1 = M2 + {8'h00, M1[15:8]}
//   ADDER2 (24 bit): A2 = {M4, 8'h00} + {8'h00, M3}
//   ADDER3 (24 bit): q[31:8] = A2 + {8'h00, A1}
//   q[7:0] = M1[7:0]
// ADDER1 and ADDER2 work in parallel, ADDER3 after them, so the critical
// path is one 8 x 8 multiplier and two adders. No adder can overflow for
// 16-bit operands (A1 <= 65279, q < 2^32), so carry ins are 0 and carry
// outs unused.
//
// ADDER selects the adders' carry scheme (ripple carry, carry look-ahead or
// Kogge-Stone, default Kogge-Stone). The split, the three adders and their
// widths are the published structure; the parameter is this design's way of
// building the compared variants from one source.
//
// Interface: a, b (16 bits) in; q (32 bits) out. Purely combinational.
module vedic_mult16
  import vedic_pkg::*;
#(
  parameter adder_kind_e ADDER = ADDER_KSA
) (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] q
);

  logic [15:0] m1_out, m2_out, m3_out, m4_out;
  logic [15:0] a1_out;
  logic [23:0] a2_out;
  logic [23:0] a3_out;
  logic        a1_cout, a2_cout, a3_cout;  // always 0, see above

  urdhva_mult #(.N(8)) u_m1 (.a(a[7:0]),  .b(b[7:0]),  .p(m1_out));
  urdhva_mult #(.N(8)) u_m2 (.a(a[15:8]), .b(b[7:0]),  .p(m2_out));
  urdhva_mult #(.N(8)) u_m3 (.a(a[7:0]),  .b(b[15:8]), .p(m3_out));
  urdhva_mult #(.N(8)) u_m4 (.a(a[15:8]), .b(b[15:8]), .p(m4_out));

  generic_adder #(.WIDTH(16), .KIND(ADDER)) u_adder1 (
    .a   (m2_out),
    .b   ({8'h00, m1_out[15:8]}),
    .cin (1'b0),
    .s   (a1_out),
    .cout(a1_cout)
  );

  generic_adder #(.WIDTH(24), .KIND(ADDER)) u_adder2 (
    .a   ({m4_out, 8'h00}),
    .b   ({8'h00, m3_out}),
    .cin (1'b0),
    .s   (a2_out),
    .cout(a2_cout)
  );

  generic_adder #(.WIDTH(24), .KIND(ADDER)) u_adder3 (
    .a   (a2_out),
    .b   ({8'h00, a1_out}),
    .cin (1'b0),
    .s   (a3_out),
    .cout(a3_cout)
  );

  assign q = {a3_out, m1_out[7:0]};

  // The operand ranges make every carry out of the tree zero.
  always_comb begin
    assert (!(a1_cout | a2_cout | a3_cout))
      else $error("vedic_mult16: addition tree overflow");
  end

endmodule : vedic_mult16
