// mb_block: expandable N x N (8x8) radix-4 Modified Booth multiplier block
// with a carry-save array reduction.
//
// The block multiplies one N-bit multiplicand slice `a` by one N-bit
// multiplier slice `b` and adds the result into a carry-save pair of words.
// Blocks are tiled into a wider multiplier: blocks that share a multiplier
// slice sit side by side and work in parallel on the same adder rows; the
// groups of different multiplier slices follow one another, each group's
// outputs being the next group's inputs. A single block with BASE = 0 and
// the default W is a stand-alone N x N multiplier-accumulator.
//
// Inside: a Booth recoder for the `b` slice, N/2 + 1 partial-product rows
// (N/2 Booth digits plus the extra digit an unsigned multiplier needs) and
// one carry-save adder row per partial product: five rows for N = 8.
// Row r is placed at product column BASE + 2r and the block adds into the
// W columns from there (clipped at the top of the product, PW). Inner blocks
// use W = N; the block holding the top multiplicand slice reaches to the top
// of the product (W = PW - BASE) so that sign bits and carries always have a
// column to go to.
//
// Because every row starts two columns higher than the one before, after
// each row but the last the two lowest columns leave the block: their sum
// bits and the carry out of the lowest column go right (r_s, r_c) to the
// neighbouring block, which needs them as the two highest columns of its
// next row (l_s, l_c). In the block holding the lowest multiplicand slice
// they are finished product columns and go to the final adder. The carry
// bit at a row's lowest column is free and carries the "+1" (hot one) that
// completes a negated partial product; only the lowest block sets it.
// After the last row the block's sum and carry bits (s_out, c_out, the
// carries one column higher) feed the block of the next multiplier slice
// at the same multiplicand position, whose first row starts exactly there;
// the carry out of the top column of an inner block belongs to the block on
// the left in the next group.
//
// Sign handling (pos.a_msb = 1): the sign bit of Booth rows 1 .. N/2-1 is
// inverted and the constant -sum(2^(BASE + 2r + N + 1)), r = 1 .. N/2-1, is
// added; that constant, merged with the sign bit of row 0, is carried in the
// free upper columns of row 0, so it costs no extra adder row. The extra row
// is sign-extended over its free upper columns. With N = 8, BASE = 0,
// PW = 16 and a negative row 0 the constant bits land in columns 9, 10, 12
// and 14.
//
// Position bits (pos) and dec_en are inputs, so the same logic serves every
// place in the array; only W, the physical width, is a parameter.
// dec_en = 1 uses the block's own recoder; with dec_en = 0 the recoder is
// switched off and the select lines come from sel_in, driven by the block
// that holds the top multiplicand slice of the same multiplier slice.
// sel_out always shows the selects in use.
//
// Timing: combinational, N/2 + 1 full-adder delays from s_in / c_in to
// s_out / c_out, plus recoding and partial-product selection. Arithmetic is
// modulo 2^PW; the carry out of column PW-1 is dropped.
module mb_block
  import mbx_pkg::*;
#(
  parameter int N    = 8,      // slice width
  parameter int PW   = 2 * N,  // width of the carry-save words (product width)
  parameter int BASE = 0,      // product column of the block's least significant bit
  parameter int W    = PW - BASE,  // columns the block adds into in each row
  localparam int WO  = ((BASE + N + W < PW) ? BASE + N + W : PW) - (BASE + N)
) (
  input  logic                [N-1:0]  a,         // multiplicand slice
  input  logic                         a_below,   // top bit of the next lower multiplicand slice
  input  logic                [N-1:0]  b,         // multiplier slice
  input  logic                         b_below,   // top bit of the next lower multiplier slice
  input  blk_pos_t                     pos,
  input  logic                         a_signed,  // multiplicand is two's complement
  input  logic                         b_signed,  // multiplier is two's complement
  input  logic                         dec_en,
  input  booth_sel_t          [N/2:0]  sel_in,
  output booth_sel_t          [N/2:0]  sel_out,
  input  logic                [W-1:0]  s_in,      // sum word over the row-0 columns
  input  logic                [W-1:0]  c_in,      // carry word over the row-0 columns
  input  logic         [N/2-1:0][1:0]  l_s,       // from the left block, per row: its two lowest sum bits
  input  logic         [N/2-1:0]       l_c,       // from the left block, per row: its lowest outgoing carry
  output logic         [N/2-1:0][1:0]  r_s,       // to the right block (or the final adder): two lowest sum bits
  output logic         [N/2-1:0][1:0]  r_c,       // to the right: {carry out of the lowest column, hot one}
  output logic                [WO-1:0] s_out,     // sum word after the last row, columns BASE+N ..
  output logic                [WO-1:0] c_out      // carries after the last row, one column higher
);
  localparam int R = N / 2 + 1;  // partial-product rows

  // Sign-correction constant for the inverted sign bits of rows 1 .. N/2-1
  // (row 0 keeps its sign bit; its weight is subtracted in K1 below).
  function automatic logic [PW-1:0] sign_const();
    logic [PW-1:0] k;
    k = '0;
    for (int r = 1; r < N / 2; r++) begin
      if (BASE + 2 * r + N + 1 < PW) k = k - (PW'(1) << (BASE + 2 * r + N + 1));
    end
    return k;
  endfunction

  localparam logic [PW-1:0] K0 = sign_const();  // row 0 non-negative
  localparam logic [PW-1:0] K1 = (BASE + N + 1 < PW) ?
                                 K0 - (PW'(1) << (BASE + N + 1)) : K0;  // row 0 negative

  // ---- Booth recoding --------------------------------------------------
  booth_sel_t [N/2:0] sel_own;

  booth_decoder #(.N(N)) u_dec (
    .en      (dec_en),
    .b       (b),
    .b_below (b_below),
    .b_msb   (pos.b_msb),
    .b_signed(b_signed),
    .sel     (sel_own)
  );

  assign sel_out = dec_en ? sel_own : sel_in;

  // ---- Partial products, placed at their product columns ----------------
  logic [R-1:0][N+1:0]  field;
  logic [R-1:0][PW-1:0] pp;

  for (genvar r = 0; r < R; r++) begin : g_pp
    booth_ppgen #(.N(N)) u_ppg (
      .a       (a),
      .a_below (a_below),
      .a_msb   (pos.a_msb),
      .a_signed(a_signed),
      .sel     (sel_out[r]),
      .pp      (field[r])
    );
  end

  always_comb begin
    pp = '0;
    for (int r = 0; r < R; r++) begin
      // magnitude bits 0 .. N-1 come from every block
      for (int k = 0; k < N; k++) begin
        if (BASE + 2 * r + k < PW) pp[r][BASE + 2 * r + k] = field[r][k];
      end
      if (pos.a_msb) begin
        if (BASE + 2 * r + N < PW) pp[r][BASE + 2 * r + N] = field[r][N];
        if (r == 0) begin
          // sign of row 0 folded into the correction constant
          pp[r] = pp[r] | (field[r][N+1] ? K1 : K0);
        end else if (r < N / 2) begin
          if (BASE + 2 * r + N + 1 < PW) pp[r][BASE + 2 * r + N + 1] = ~field[r][N+1];
        end else begin
          // extra row: plain sign extension
          for (int k = N + 1; BASE + 2 * r + k < PW; k++) pp[r][BASE + 2 * r + k] = field[r][N+1];
        end
      end
    end
  end

  // ---- Carry-save array: one adder row per partial product ------------
  // Row r adds into columns [lo(r), hi(r)); values are kept at their
  // product column in the PW-wide vectors below (other bits are zero).
  function automatic int lo_col(input int r);
    return BASE + 2 * r;
  endfunction
  function automatic int hi_col(input int r);
    return (BASE + 2 * r + W < PW) ? BASE + 2 * r + W : PW;
  endfunction

  logic [R-2:0][PW-1:0] s_row;   // sum bit of column k, rows 0 .. R-2
  logic [R-2:0][PW-1:0] cy_row;  // carry out of column k (weight k+1)

  for (genvar r = 0; r < R; r++) begin : g_row
    localparam int LO = lo_col(r);
    localparam int HI = hi_col(r);
    localparam int WR = HI - LO;
    logic [WR-1:0] x, y, z, s, cy;

    assign z = pp[r][HI-1:LO];

    if (r == 0) begin : g_first
      assign x = s_in;
      assign y = c_in;
    end else begin : g_next
      localparam int HP = hi_col(r - 1);  // end of the previous row's columns
      always_comb begin
        for (int k = 0; k < WR; k++) begin
          // sum bit of the same column, from this block's previous row or,
          // above its columns, from the block on the left
          if (LO + k < HP) x[k] = s_row[r-1][LO + k];
          else             x[k] = l_s[r-1][(LO + k - HP) % 2];
          // carry out of the column below
          if (LO + k - 1 < HP) y[k] = cy_row[r-1][LO + k - 1];
          else                 y[k] = l_c[r-1];
        end
      end
    end

    csa_row #(.W(WR)) u_csa (.x(x), .y(y), .z(z), .s(s), .c(cy));

    // the two lowest columns leave the block after every row but the last;
    // the carry bit at the lowest column is free and holds the hot one
    if (r < R - 1) begin : g_right
      assign s_row[r]  = PW'(s) << LO;
      assign cy_row[r] = PW'(cy) << LO;
      assign r_s[r]    = s[1:0];
      assign r_c[r]    = {cy[0], sel_out[r].neg & pos.a_lsb};
    end else begin : g_bottom
      assign s_out = s;
      assign c_out = cy;
    end
  end

  initial begin
    assert (N % 2 == 0 && N >= 2) else $error("mb_block: N must be even");
    assert (BASE + W <= PW && PW - BASE >= N + 2 && W >= 2)
      else $error("mb_block: block columns must fit the carry-save words");
  end
endmodule
