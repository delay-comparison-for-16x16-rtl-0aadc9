// full_adder: one-bit full adder.
//
//   s    = a ^ b ^ cin
//   cout = a & b | (a ^ b) & cin
//
// Besides sum and carry it exports the bit's propagate p = a ^ b and
// generate g = a & b, which the 4-bit carry look-ahead group (cla4) reads
// instead of the rippled carry. Purely combinational; the equations are the
// standard ones, the extra p/g outputs are what a look-ahead unit needs.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout,
  output logic p,
  output logic g
);

  always_comb begin
    p    = a ^ b;
    g    = a & b;
    s    = p ^ cin;
    cout = g | (p & cin);
  end

endmodule : full_adder
