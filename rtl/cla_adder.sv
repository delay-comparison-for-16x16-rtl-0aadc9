// cla_adder: WIDTH-bit carry look-ahead adder.
//
// WIDTH/4 cla4 groups side by side. Inside a group every carry comes from
// the look-ahead equations; between groups the carry out C4 of one group is
// the carry in C0 of the next, so the carry crosses 16 bits in four group
// steps instead of sixteen bit steps. The groups' PG/GG outputs are left
// unused: chaining the groups this way, rather than adding a second
// look-ahead level, is this design's choice.
//
// WIDTH must be a multiple of 4. Interface: a, b, cin in; s, cout out.
// Purely combinational.
module cla_adder #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);

  localparam int unsigned GROUPS = WIDTH / 4;

  logic [GROUPS:0]   c;     // c[k] is the carry into group k

  initial assert (WIDTH % 4 == 0 && WIDTH > 0)
    else $error("cla_adder: WIDTH (%0d) must be a positive multiple of 4", WIDTH);

  assign c[0] = cin;

  for (genvar k = 0; k < GROUPS; k++) begin : g_group
    cla4 u_cla4 (
      .a (a[4*k +: 4]),
      .b (b[4*k +: 4]),
      .c0(c[k]),
      .s (s[4*k +: 4]),
      .c4(c[k+1]),
      .pg(),
      .gg()
    );
  end

  assign cout = c[GROUPS];

endmodule : cla_adder
