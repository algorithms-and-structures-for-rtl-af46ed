// booth_ppgen: one radix-4 Booth partial-product row for one N-bit slice of
// the multiplicand.
//
// Each bit k is ((one & a[k]) | (two & a[k-1])) ^ neg, i.e. the slice times
// |digit|, inverted for negative digits (the +1 that completes the two's
// complement is added in the carry-save array, only by the block that holds
// the least significant multiplicand slice). a[-1] is a_below, the top bit of
// the next lower slice, so a row split across blocks equals one wide row.
// The block holding the most significant slice (a_msb = 1) also produces the
// two extra bits N and N+1 that the m + log2(r) partial-product length
// requires: the slice is extended with its sign bit when a_signed = 1 and
// with 0 otherwise, and bit N+1 is the sign of the row. Other blocks leave
// bits N and N+1 at 0. Purely combinational.
module booth_ppgen
  import mbx_pkg::*;
#(
  parameter int N = 8
) (
  input  logic           [N-1:0] a,
  input  logic                   a_below,
  input  logic                   a_msb,
  input  logic                   a_signed,
  input  booth_sel_t             sel,
  output logic           [N+1:0] pp
);
  logic [N+1:0] ax;   // a[k] for k = 0 .. N+1, extended above the slice
  logic [N+1:0] axm;  // a[k-1] for the same k
  logic         ext;

  assign ext = a_msb & a_signed & a[N-1];
  assign ax  = {ext, ext, a};
  assign axm = {ext, a, a_below};

  always_comb begin
    for (int k = 0; k < N + 2; k++) begin
      pp[k] = ((sel.one & ax[k]) | (sel.two & axm[k])) ^ sel.neg;
    end
    if (!a_msb) pp[N+1:N] = '0;
  end
endmodule
