// vedic_top: the three 16 x 16 Vedic multiplier variants side by side.
//
// The same operands drive three vedic_mult16 instances whose addition
// trees use, respectively, ripple carry adders, carry look-ahead adders and
// Kogge-Stone adders. All three compute the same 32-bit unsigned product;
// they differ only in area and in the delay of their adder tree, which is
// what the variants exist to compare. Putting them in one top, on shared
// operands, is this design's choice; use vedic_mult16 on its own for a
// single multiplier.
//
// Interface: a, b (16 bits) in; q_rca, q_cla, q_ksa (32 bits) out.
// Purely combinational.
module vedic_top
  import vedic_pkg::*;
(
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] q_rca,
  output logic [31:0] q_cla,
  output logic [31:0] q_ksa
);

  vedic_mult16 #(.ADDER(ADDER_RCA)) u_mult_rca (.a, .b, .q(q_rca));
  vedic_mult16 #(.ADDER(ADDER_CLA)) u_mult_cla (.a, .b, .q(q_cla));
  vedic_mult16 #(.ADDER(ADDER_KSA)) u_mult_ksa (.a, .b, .q(q_ksa));

endmodule : vedic_top
