// csa_row: one row of a carry-save adder, W full adders side by side.
//
// Reduces three W-bit words to two without propagating carries: for every
// column k, s[k] is the sum bit and c[k] the carry bit of x[k]+y[k]+z[k].
// c[k] has weight 2^(k+1); the caller shifts it by one column when it feeds
// the next row, as in a carry-save array multiplier. x + y + z == s + 2*c
// exactly (no bit is lost). Purely combinational, one full-adder delay.
module csa_row #(
  parameter int W = 16
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);
  for (genvar k = 0; k < W; k++) begin : g_fa
    full_adder u_fa (.x(x[k]), .y(y[k]), .z(z[k]), .s(s[k]), .co(c[k]));
  end
endmodule
