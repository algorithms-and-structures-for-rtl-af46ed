// tb_mb_block: self-checking test of the 8x8 expandable Booth block in
// three places of an array.
//
// u0 is a stand-alone 8x8 multiplier-accumulator (PW = 16, BASE = 0, all
// position bits set, own recoder). It runs exhaustively over all operand
// pairs in all four signedness modes with random carry-save inputs. The
// bits it hands right after each row plus its final sum and carry words,
// each at its column weight, must equal s_in + c_in + a * b (mod 2^16),
// the product worked out here.
//
// u1 is an inner block (PW = 24, BASE = 8, W = 8, lowest multiplicand slice,
// not top, recoder off) driven through sel_in with select lines the
// testbench recodes itself, and with random bits from a left neighbour.
// Nothing may be lost: everything that enters (carry-save words, left bits,
// the selected multiples of the slice, inverted for negative digits, plus
// their hot ones) must equal everything that leaves, exactly.
//
// u2 is the top block of a wider array (PW = 24, BASE = 8, top multiplicand
// slice, not the lowest one, top multiplier slice). Its output must equal
// its inputs plus the sum of its 10-bit signed row fragments (the
// sign-extended multiple of the slice, bit-inverted for a negative digit,
// without the hot one, which belongs to the lowest block) and, for an
// unsigned multiplier, the extra row, modulo 2^24.
//
// The depth of N/2 + 1 = 5 adder rows is structural; the block has no clock.
module tb_mb_block;
  import mbx_pkg::*;
  localparam int N = 8;
  localparam int H = N / 2;

  // ---- u0: stand-alone --------------------------------------------------
  logic [N-1:0]       a0, b0;
  logic               as0, bs0;
  logic [2*N-1:0]     si0, ci0;
  logic [N-1:0]       so0, co0;
  logic [H-1:0][1:0]  rs0, rc0;
  booth_sel_t [H:0]   selo0;

  mb_block #(.N(N), .PW(2 * N), .BASE(0)) u0 (
    .a(a0), .a_below(1'b0), .b(b0), .b_below(1'b0),
    .pos('{a_lsb: 1'b1, a_msb: 1'b1, b_msb: 1'b1}),
    .a_signed(as0), .b_signed(bs0), .dec_en(1'b1),
    .sel_in('0), .sel_out(selo0),
    .s_in(si0), .c_in(ci0), .l_s('0), .l_c('0),
    .r_s(rs0), .r_c(rc0), .s_out(so0), .c_out(co0)
  );

  // ---- u1: inner block ----------------------------------------------------
  logic [N-1:0]       a1;
  logic               ab1;
  logic [N-1:0]       si1, ci1, so1, co1;
  logic [H-1:0][1:0]  ls1, rs1, rc1;
  logic [H-1:0]       lc1;
  booth_sel_t [H:0]   seli1, selo1;

  mb_block #(.N(N), .PW(3 * N), .BASE(N), .W(N)) u1 (
    .a(a1), .a_below(ab1), .b('0), .b_below(1'b0),
    .pos('{a_lsb: 1'b1, a_msb: 1'b0, b_msb: 1'b0}),
    .a_signed(1'b1), .b_signed(1'b1), .dec_en(1'b0),
    .sel_in(seli1), .sel_out(selo1),
    .s_in(si1), .c_in(ci1), .l_s(ls1), .l_c(lc1),
    .r_s(rs1), .r_c(rc1), .s_out(so1), .c_out(co1)
  );

  // ---- u2: top block of a wider array ---------------------------------
  logic [N-1:0]       a2, b2;
  logic               ab2, bb2, as2, bs2;
  logic [2*N-1:0]     si2, ci2;
  logic [N-1:0]       so2, co2;
  logic [H-1:0][1:0]  rs2, rc2;
  booth_sel_t [H:0]   selo2;

  mb_block #(.N(N), .PW(3 * N), .BASE(N)) u2 (
    .a(a2), .a_below(ab2), .b(b2), .b_below(bb2),
    .pos('{a_lsb: 1'b0, a_msb: 1'b1, b_msb: 1'b1}),
    .a_signed(as2), .b_signed(bs2), .dec_en(1'b1),
    .sel_in('0), .sel_out(selo2),
    .s_in(si2), .c_in(ci2), .l_s('0), .l_c('0),
    .r_s(rs2), .r_c(rc2), .s_out(so2), .c_out(co2)
  );

  int checks = 0;
  int failures = 0;

  function automatic longint sv8(input logic [N-1:0] v, input logic sgn);
    return (sgn && v[N-1]) ? longint'(v) - 256 : longint'(v);
  endfunction

  // weighted value of what a block hands out: right-going bits after rows
  // 0 .. H-1, then the last row's sum and carry words
  function automatic longint outval(input int base, input logic [H-1:0][1:0] rs,
                                    input logic [H-1:0][1:0] rc, input longint s,
                                    input longint c);
    longint v;
    v = 0;
    for (int r = 0; r < H; r++)
      v += (longint'(rs[r][0]) + longint'(rs[r][1]) * 2 + longint'(rc[r][0]) +
            longint'(rc[r][1]) * 2) << (base + 2 * r);
    v += s << (base + N);
    v += c << (base + N + 1);
    return v;
  endfunction

  initial begin : watchdog
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // ---- u0: exhaustive stand-alone multiply-add ----------------------
    for (int m = 0; m < 4; m++)
      for (int x = 0; x < 2 ** N; x++)
        for (int y = 0; y < 2 ** N; y++) begin
          longint want, got;
          a0 = N'(x); b0 = N'(y); as0 = m[0]; bs0 = m[1];
          si0 = 16'($urandom); ci0 = 16'($urandom);
          #1;
          want = (sv8(a0, as0) * sv8(b0, bs0) + longint'(si0) + longint'(ci0)) & 64'hffff;
          got  = outval(0, rs0, rc0, longint'(so0), longint'(co0)) & 64'hffff;
          checks++;
          if (got != want) begin
            failures++;
            if (failures <= 10)
              $display("FAIL u0 a=%h(%b) b=%h(%b) si=%h ci=%h: %h want %h",
                       a0, as0, b0, bs0, si0, ci0, got, want);
          end
        end

    // ---- u1: inner block, conservation of value ------------------------
    for (int n = 0; n < 50000; n++) begin
      logic [N:0] bx;
      longint     vin, vout;
      int         d, f;
      a1 = N'($urandom); ab1 = 1'($urandom);
      si1 = N'($urandom); ci1 = N'($urandom);
      ls1 = (2 * H)'($urandom); lc1 = H'($urandom);
      bx = (N + 1)'($urandom);
      vin = (longint'(si1) + longint'(ci1)) << N;
      for (int r = 0; r < H; r++) begin
        d = -2 * int'(bx[2*r+2]) + int'(bx[2*r+1]) + int'(bx[2*r]);
        seli1[r].neg = bx[2*r+2];
        seli1[r].one = (d == 1 || d == -1);
        seli1[r].two = (d == 2 || d == -2);
        f = (d == 2 || d == -2) ? (2 * int'(a1) + int'(ab1)) % 256 : (d != 0 ? int'(a1) : 0);
        if (bx[2*r+2]) f = (255 - f) + 1;  // inverted field plus hot one
        vin += longint'(f) << (N + 2 * r);
        // left bits enter at the two columns just above the block's row r
        vin += (longint'(ls1[r][0]) + 2 * longint'(ls1[r][1]) + 2 * longint'(lc1[r]))
               << (N + 2 * r + N);
      end
      seli1[H] = '0;
      #1;
      vout = outval(N, rs1, rc1, longint'(so1), longint'(co1));
      checks++;
      if (vout != vin || selo1 !== seli1) begin
        failures++;
        if (failures <= 10)
          $display("FAIL u1 a=%h below=%b b=%h: out %h in %h", a1, ab1, bx, vout, vin);
      end
    end

    // ---- u2: top block of a wider array ---------------------------------
    for (int n = 0; n < 50000; n++) begin
      logic [N+1:0] bx;
      longint       vin, vout, aext, f;
      int           d;
      a2 = N'($urandom); b2 = N'($urandom); ab2 = 1'($urandom); bb2 = 1'($urandom);
      as2 = 1'($urandom); bs2 = 1'($urandom);
      si2 = 16'($urandom); ci2 = 16'($urandom);
      #1;
      bx   = {1'b0, b2, bb2};
      aext = sv8(a2, as2);
      vin  = (longint'(si2) + longint'(ci2)) << N;
      for (int r = 0; r <= H; r++) begin
        if (r < H) d = -2 * int'(bx[2*r+2]) + int'(bx[2*r+1]) + int'(bx[2*r]);
        else       d = bs2 ? 0 : int'(b2[N-1]);  // extra row of an unsigned multiplier
        f = (d == 2 || d == -2) ? 2 * aext + longint'(ab2) : (d != 0 ? aext : 0);
        if (r < H && bx[2*r+2]) f = -f - 1;  // bit inversion of the 10-bit field
        vin += f << (N + 2 * r);
      end
      vout = outval(N, rs2, rc2, longint'(so2), longint'(co2));
      checks++;
      if ((vout & 64'hff_ffff) != (vin & 64'hff_ffff)) begin
        failures++;
        if (failures <= 10)
          $display("FAIL u2 a=%h(%b) b=%h(%b) below=%b%b: out %h in %h",
                   a2, as2, b2, bs2, ab2, bb2, vout & 64'hff_ffff, vin & 64'hff_ffff);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
