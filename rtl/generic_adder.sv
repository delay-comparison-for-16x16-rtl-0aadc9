// generic_adder: WIDTH-bit adder whose carry scheme is a parameter.
//
// KIND picks one of the three adders of this design (vedic_pkg::adder_kind_e):
//   ADDER_RCA  ripple carry chain of full adders       (rca_adder)
//   ADDER_CLA  chained 4-bit carry look-ahead groups   (cla_adder)
//   ADDER_KSA  Kogge-Stone parallel prefix network     (ksa_adder, default)
// It lets the multiplier's addition tree be written once and rebuilt with
// any of them. ADDER_CLA needs WIDTH to be a multiple of 4. A width-generic
// adder is part of the published approach; choosing its scheme with an enum
// parameter is this design's choice.
//
// Interface: a, b, cin in; s, cout out. Purely combinational.
module generic_adder
  import vedic_pkg::*;
#(
  parameter int unsigned WIDTH = 16,
  parameter adder_kind_e KIND  = ADDER_KSA
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);

  if (KIND == ADDER_RCA) begin : g_rca
    rca_adder #(.WIDTH(WIDTH)) u_add (.a, .b, .cin, .s, .cout);
  end else if (KIND == ADDER_CLA) begin : g_cla
    cla_adder #(.WIDTH(WIDTH)) u_add (.a, .b, .cin, .s, .cout);
  end else begin : g_ksa
    ksa_adder #(.WIDTH(WIDTH)) u_add (.a, .b, .cin, .s, .cout);
  end

endmodule : generic_adder
