// booth_decoder: radix-4 Modified Booth recoder for one N-bit slice of the
// multiplier.
//
// Digit i (i = 0 .. N/2-1) is read from bits (b[2i+1], b[2i], b[2i-1]) of the
// slice, with b[-1] = b_below, the top bit of the next lower slice (0 for
// the lowest slice). Chaining the slices this way recodes the whole
// multiplier exactly as one wide recoder would. Digit N/2 is the extra digit
// an unsigned multiplier needs ((n/2)+1 partial products): it equals the
// slice's top bit and is only produced by the most significant slice
// (b_msb = 1) in unsigned mode (b_signed = 0); otherwise it is zero.
// With en = 0 every select line is 0, the decoder is switched off and the
// block uses the selects of another block's decoder instead.
// Purely combinational.
module booth_decoder
  import mbx_pkg::*;
#(
  parameter int N = 8
) (
  input  logic                 en,
  input  logic [N-1:0]         b,
  input  logic                 b_below,
  input  logic                 b_msb,
  input  logic                 b_signed,
  output booth_sel_t [N/2:0]   sel
);
  logic [N:0] bx;  // slice with b[-1] appended below
  assign bx = {b, b_below};

  always_comb begin
    for (int i = 0; i < N/2; i++) begin
      sel[i] = en ? booth_encode(bx[2*i +: 3]) : '0;
    end
    sel[N/2]     = '0;
    sel[N/2].one = en & b_msb & ~b_signed & b[N-1];
  end
endmodule
