// mb_multiplier: (P*N) x (Q*N) multiplier-accumulator built from P*Q
// expandable N x N radix-4 Modified Booth blocks (default: 16x16 from four
// 8x8 blocks), computing
//
//     p = a * b + c   (mod 2^(P*N + Q*N))
//
// for any mix of two's complement and unsigned operands, selected by
// a_signed and b_signed.
//
// Block (i, j) multiplies multiplicand slice i by multiplier slice j and
// starts at product column N*(i + j). The P blocks of one multiplier slice
// form a group: they work side by side on the same five carry-save adder
// rows, each block adding into its own columns and handing its two lowest
// columns to the block on its right after every row. The Q groups follow
// one another: the sum and carry bits a block leaves after its last row are
// the first-row inputs of the block at the same multiplicand position in
// the next group. The accumulate operand c enters on the otherwise free sum
// inputs of the first group's first row. The columns that leave the lowest
// block of each group, and the last group's outputs, make up the final
// carry-save pair, which the carry-propagate adder resolves.
//
// Within a group only the block holding the top multiplicand slice runs
// its Booth recoder; the others take its select lines. Each block's
// position bits (lowest / top multiplicand slice, top multiplier slice) are
// tied here from its place in the grid.
//
// Timing: purely combinational. The carry-save depth is Q*(N/2 + 1) adder
// rows (10 for 16x16), independent of P, followed by a (P+Q)*N-bit
// carry-propagate adder.
module mb_multiplier
  import mbx_pkg::*;
#(
  parameter int N = 8,  // block (slice) width
  parameter int P = 2,  // multiplicand slices
  parameter int Q = 2   // multiplier slices
) (
  input  logic [P*N-1:0]       a,
  input  logic [Q*N-1:0]       b,
  input  logic                 a_signed,
  input  logic                 b_signed,
  input  logic [(P+Q)*N-1:0]   c,
  output logic [(P+Q)*N-1:0]   p
);
  localparam int PW = (P + Q) * N;

  booth_sel_t [Q-1:0][P-1:0][N/2:0]  sel;
  logic [Q-1:0][P-1:0][N/2-1:0][1:0] rs, rc;   // right-going bits per row

  // final carry-save pair handed to the carry-propagate adder
  logic [PW-1:0] fin_s, fin_c;

  for (genvar j = 0; j < Q; j++) begin : g_b
    for (genvar i = 0; i < P; i++) begin : g_a
      localparam int BASE = N * (i + j);
      localparam int W    = (i == P - 1) ? PW - BASE : N;
      localparam int WO   = (i == P - 1) ? PW - BASE - N : N;

      blk_pos_t pos;
      assign pos.a_lsb = (i == 0);
      assign pos.a_msb = (i == P - 1);
      assign pos.b_msb = (j == Q - 1);

      logic a_below, b_below;
      if (i == 0) begin : g_a0
        assign a_below = 1'b0;
      end else begin : g_an
        assign a_below = a[i*N-1];
      end
      if (j == 0) begin : g_b0
        assign b_below = 1'b0;
      end else begin : g_bn
        assign b_below = b[j*N-1];
      end

      logic [W-1:0]          s_in, c_in;
      logic [WO-1:0]         s_out, c_out;
      logic [N/2-1:0][1:0]   l_s;
      logic [N/2-1:0]        l_c;

      // carry-save words entering the block's first row
      if (j == 0) begin : g_top
        assign s_in = c[BASE +: W];  // accumulate operand on the free adder inputs
        assign c_in = '0;
      end else if (i == 0) begin : g_low
        assign s_in = g_b[j-1].g_a[i].s_out;
        assign c_in = {g_b[j-1].g_a[i].c_out[W-2:0], 1'b0};
      end else begin : g_mid
        assign s_in = g_b[j-1].g_a[i].s_out;
        assign c_in = {g_b[j-1].g_a[i].c_out[W-2:0], g_b[j-1].g_a[i-1].c_out[N-1]};
      end

      // bits coming from the block on the left (none for the top block)
      if (i == P - 1) begin : g_noleft
        assign l_s = '0;
        assign l_c = '0;
      end else begin : g_left
        for (genvar r = 0; r < N / 2; r++) begin : g_lr
          assign l_s[r] = rs[j][i+1][r];
          assign l_c[r] = rc[j][i+1][r][1];
        end
      end

      mb_block #(.N(N), .PW(PW), .BASE(BASE), .W(W)) u_blk (
        .a       (a[i*N +: N]),
        .a_below (a_below),
        .b       (b[j*N +: N]),
        .b_below (b_below),
        .pos     (pos),
        .a_signed(a_signed),
        .b_signed(b_signed),
        .dec_en  (i == P - 1),
        .sel_in  (sel[j][P-1]),
        .sel_out (sel[j][i]),
        .s_in    (s_in),
        .c_in    (c_in),
        .l_s     (l_s),
        .l_c     (l_c),
        .r_s     (rs[j][i]),
        .r_c     (rc[j][i]),
        .s_out   (s_out),
        .c_out   (c_out)
      );

      // the lowest block's right-going bits are finished product columns
      if (i == 0) begin : g_fin
        for (genvar r = 0; r < N / 2; r++) begin : g_fr
          assign fin_s[BASE + 2*r +: 2] = rs[j][0][r];
          assign fin_c[BASE + 2*r +: 2] = rc[j][0][r];
        end
      end

      // the last multiplier slice's block outputs form the upper columns
      if (j == Q - 1) begin : g_last
        assign fin_s[BASE + N +: WO] = s_out;
        if (i == 0) begin : g_c0
          assign fin_c[BASE + N] = 1'b0;
        end
        if (i == P - 1) begin : g_ct
          assign fin_c[BASE + N + 1 +: WO - 1] = c_out[WO-2:0];
        end else begin : g_cn
          assign fin_c[BASE + N + 1 +: WO] = c_out;
        end
      end
    end
  end

  logic cpa_co;  // carry out of the product width: discarded (modulo 2^PW)
  cpa #(.W(PW)) u_cpa (
    .x (fin_s),
    .y (fin_c),
    .ci(1'b0),
    .s (p),
    .co(cpa_co)
  );
endmodule
