// cpa: the carry-propagate adder that closes the multiplier (the last stage
// of the generate / reduce / add structure). It adds the two words left by
// the carry-save reduction, modulo 2^W, plus a carry in. The source leaves
// the adder type open, so this is a plain W-bit adder written with `+` for
// the synthesis tool to map; the carry out is provided for chaining.
// Purely combinational.
module cpa #(
  parameter int W = 32
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         ci,
  output logic [W-1:0] s,
  output logic         co
);
  assign {co, s} = {1'b0, x} + {1'b0, y} + {{W{1'b0}}, ci};
endmodule
