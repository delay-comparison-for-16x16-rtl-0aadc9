// urdhva_mult: N x N unsigned multiplier by the Urdhva Tiryakbhyam
// ("vertically and crosswise") method.
//
// The product is formed column by column, least significant first, in
// 2N-1 steps. Step k takes every pair of operand bits joined by a line of
// the vertical-and-crosswise diagram, i.e. all a[i] & b[j] with i + j = k,
// and adds them to the carry left by step k-1 (zero before step 0). The
// least significant bit of that column sum is product bit k; the remaining
// bits are the carry into step k+1. The carry left after the last step
// gives the top product bits. All columns are plain combinational logic:
// the whole product settles in one pass, with no clock.
//
// Example, N = 4, 1101 x 1010: the seven steps of the line diagram take
// 1, 2, 3, 4, 3, 2, 1 crosswise products.
//
// The column sums are written as additions and left to synthesis to map;
// the column-and-carry order is the method's, the adder form is this
// design's choice. Interface: a, b (N bits) in; p (2N bits) out.
module urdhva_mult #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  // A column holds at most N products plus a carry below N, so its sum is
  // below 2N; CW bits hold it.
  localparam int unsigned CW = $clog2(2 * N) + 1;

  logic [CW-1:0] col;    // sum of the current step
  logic [CW-1:0] carry;  // carry into the current step

  always_comb begin
    carry = '0;
    p     = '0;
    for (int k = 0; k < 2 * N - 1; k++) begin
      col = carry;
      for (int i = 0; i < N; i++) begin
        if (k - i >= 0 && k - i < N) begin
          col = col + CW'(a[i] & b[k-i]);
        end
      end
      p[k]  = col[0];
      carry = col >> 1;
    end
    p[2*N-1] = carry[0];
  end

endmodule : urdhva_mult
