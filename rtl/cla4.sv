// cla4: 4-bit carry look-ahead adder group.
//
// Four full adders produce the bit propagates P_i = A_i ^ B_i and generates
// G_i = A_i & B_i. The look-ahead unit computes every carry directly from
// them and the group carry in C0, in two levels of logic:
//   C1 = G0 + P0.C0
//   C2 = G1 + P1.G0 + P1.P0.C0
//   C3 = G2 + P2.G1 + P2.P1.G0 + P2.P1.P0.C0
//   C4 = G3 + P3.G2 + P3.P2.G1 + P3.P2.P1.G0 + P3.P2.P1.P0.C0
// and feeds C1..C3 back to the full adders as their carry in. It also
// outputs the group propagate PG = P3.P2.P1.P0 and group generate
// GG = G3 + P3.G2 + P3.P2.G1 + P3.P2.P1.G0 (so C4 = GG + PG.C0), for a
// second look-ahead level; the PG/GG formulas are the usual ones.
//
// Interface: a[3:0], b[3:0], c0 in; s[3:0], c4, pg, gg out. Combinational.
module cla4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       c0,
  output logic [3:0] s,
  output logic       c4,
  output logic       pg,
  output logic       gg
);

  logic [3:0] p, g;
  logic [3:0] c;          // c[i] is the carry into bit i, from the look-ahead unit

  for (genvar i = 0; i < 4; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .s   (s[i]),
      .cout(),        // the rippled carry is replaced by c[i+1]
      .p   (p[i]),
      .g   (g[i])
    );
  end

  always_comb begin
    c[0] = c0;
    c[1] = g[0] | (p[0] & c0);
    c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & c0);
    c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & c0);
    c4   = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0])
         | (p[3] & p[2] & p[1] & p[0] & c0);
    pg   = &p;
    gg   = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0]);
  end

endmodule : cla4
