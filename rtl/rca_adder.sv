// rca_adder: WIDTH-bit ripple carry adder.
//
// A chain of WIDTH full adders: the carry out of bit i is the carry in of
// bit i+1, so the sum is valid only once the carry has rippled through the
// whole chain (delay grows linearly with WIDTH). The 16-bit default is four
// 4-bit ripple stages back to back, written here as one chain.
//
// The chain and the full-adder equations are the published structure; the
// carry-in port (tied to 0 by the multiplier) is this design's addition.
//
// Interface: a, b, cin in; s, cout out. Purely combinational.
module rca_adder #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);

  logic [WIDTH:0]   c;     // c[i] is the carry into bit i

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .s   (s[i]),
      .cout(c[i+1]),
      .p   (),
      .g   ()
    );
  end

  assign cout = c[WIDTH];

endmodule : rca_adder
