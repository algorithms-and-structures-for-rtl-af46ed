// tb_mb_multiplier_sizes: self-checking test of the expandable multiplier
// built at other sizes than the default 16x16: 8x8 (one block), 16x8,
// 8x16, 24x16, 16x24, 24x24 and 32x32. Each size gets random operands in
// random signedness modes with a random accumulate operand, compared with
// a * b + c computed here in 64-bit arithmetic (the largest product is 64
// bits wide, so results are exact modulo 2^(width)).
module tb_mb_multiplier_sizes;
  localparam int N = 8;
  localparam int NS = 7;
  localparam int PS [NS] = '{1, 2, 1, 3, 2, 3, 4};
  localparam int QS [NS] = '{1, 1, 2, 2, 3, 3, 4};
  localparam int VECTORS = 20000;

  int checks [NS];
  int failures [NS];
  bit done [NS];

  for (genvar g = 0; g < NS; g++) begin : g_size
    localparam int P  = PS[g];
    localparam int Q  = QS[g];
    localparam int AW = P * N;
    localparam int BW = Q * N;
    localparam int PW = AW + BW;

    logic [AW-1:0] a;
    logic [BW-1:0] b;
    logic          a_signed, b_signed;
    logic [PW-1:0] c, p;

    mb_multiplier #(.N(N), .P(P), .Q(Q)) dut (.*);

    function automatic longint ext(input longint v, input int w, input logic sgn);
      longint m;
      m = (w >= 64) ? -1 : ((longint'(1) << w) - 1);
      v = v & m;
      if (sgn && w < 64 && v[w-1]) v = v | ~m;
      return v;
    endfunction

    initial begin
      checks[g] = 0;
      failures[g] = 0;
      done[g] = 0;
      for (int n = 0; n < VECTORS; n++) begin
        longint want, mask;
        a = AW'({$urandom, $urandom});
        b = BW'({$urandom, $urandom});
        if (n < 8) begin  // corner operands first
          a = n[0] ? '1 : {1'b1, {(AW - 1){1'b0}}};
          b = n[1] ? '1 : {1'b1, {(BW - 1){1'b0}}};
        end
        a_signed = 1'($urandom);
        b_signed = 1'($urandom);
        c = PW'({$urandom, $urandom});
        #1;
        mask = (PW >= 64) ? -1 : ((longint'(1) << PW) - 1);
        want = (ext(longint'(a), AW, a_signed) * ext(longint'(b), BW, b_signed) + longint'(c)) & mask;
        checks[g]++;
        if (longint'(p) != want) begin
          failures[g]++;
          if (failures[g] <= 5)
            $display("FAIL %0dx%0d a=%h(%b) b=%h(%b) c=%h: p=%h want %h",
                     AW, BW, a, a_signed, b, b_signed, c, p, want);
        end
      end
      done[g] = 1;
    end
  end

  initial begin : watchdog
    #100_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  initial begin
    int tc, tf;
    wait (done.and() == 1'b1);
    tc = 0; tf = 0;
    for (int g = 0; g < NS; g++) begin
      $display("size %0dx%0d: %0d checks, %0d failures", PS[g] * N, QS[g] * N, checks[g], failures[g]);
      tc += checks[g];
      tf += failures[g];
    end
    $display("TB_RESULT checks=%0d failures=%0d", tc, tf);
    $finish;
  end
endmodule
