// ksa_adder: WIDTH-bit Kogge-Stone parallel prefix adder.
//
// Three steps:
//  1. Preprocessing: every bit forms P_i = A_i ^ B_i and G_i = A_i & B_i.
//     The carry in is folded into bit 0 (G_0 |= P_0 & cin), so the prefix
//     network needs no extra column.
//  2. Carry generation: LEVELS = clog2(WIDTH) rows of prefix cells. In row
//     l, bit i (i >= 2^l) combines its group (i .. k+1) with the group
//     ending at k = i - 2^l:
//        G[i:j] = G[i:k+1] | (P[i:k+1] & G[k:j])
//        P[i:j] = P[i:k+1] & P[k:j]
//     Bits below 2^l pass through. After the last row G[i:0] is the carry
//     into bit i+1. Every cell drives at most two others and the depth is
//     log2(WIDTH), which is why this adder is fast (and large).
//  3. Postprocessing: S_i = P_i ^ C_i with C_0 = cin and C_i = G[i-1:0].
//
// For the 16-bit default the rows combine at distances 1, 2, 4 and 8.
// The three steps and the prefix-cell equations are the published ones;
// folding the carry in into bit 0 and describing the rows as a loop are
// this design's choices.
// Interface: a, b, cin in; s, cout out. Purely combinational.
module ksa_adder #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);

  localparam int unsigned LEVELS = (WIDTH > 1) ? $clog2(WIDTH) : 1;

  logic [WIDTH-1:0] p0;      // bit propagate, kept for the sums
  logic [WIDTH-1:0] gp, pp;  // group generate / propagate of the current row
  logic [WIDTH-1:0] gn, pn;  // the same after the next row

  always_comb begin
    // Preprocessing
    p0    = a ^ b;
    pp    = p0;
    gp    = a & b;
    gp[0] = gp[0] | (p0[0] & cin);

    // Carry generation network: row l combines at distance 2^l
    for (int l = 0; l < LEVELS; l++) begin
      gn = gp;
      pn = pp;
      for (int i = 1 << l; i < WIDTH; i++) begin
        gn[i] = gp[i] | (pp[i] & gp[i-(1<<l)]);
        pn[i] = pp[i] & pp[i-(1<<l)];
      end
      gp = gn;
      pp = pn;
    end

    // Postprocessing
    s    = p0 ^ {gp[WIDTH-2:0], cin};
    cout = gp[WIDTH-1];
  end

endmodule : ksa_adder
