// tb_mb_multiplier: end-to-end self-checking test of the expandable
// multiplier-accumulator at its default size (16x16 from four 8x8 blocks).
//
// Applies directed corner operands and random operands in all four
// signedness modes, with and without an accumulate operand, and compares
// p with a * b + c computed here in 64-bit integer arithmetic. It also
// counts how often each mechanism of the design was exercised (each
// signedness mode, accumulation, a negative Booth digit, the "-0" digit
// from bits 111, the extra digit of an unsigned multiplier, the hot one of a
// negated row) and counts a failure for any that never occurred.
// The design is combinational; each vector is held for 1 ns.
module tb_mb_multiplier;
  localparam int N  = 8;
  localparam int P  = 2;
  localparam int Q  = 2;
  localparam int AW = P * N;
  localparam int BW = Q * N;
  localparam int PW = AW + BW;

  logic [AW-1:0] a;
  logic [BW-1:0] b;
  logic          a_signed, b_signed;
  logic [PW-1:0] c;
  logic [PW-1:0] p;

  int checks = 0;
  int failures = 0;

  // mechanism counters
  int n_ss = 0, n_uu = 0, n_su = 0, n_us = 0;
  int n_mac = 0, n_negdig = 0, n_negzero = 0, n_extra = 0;

  mb_multiplier dut (.*);

  function automatic longint sval(input logic [63:0] v, input int w, input logic sgn);
    longint r;
    r = longint'(v & ((64'd1 << w) - 1));
    if (sgn && v[w-1]) r = r - (longint'(1) << w);
    return r;
  endfunction

  task automatic apply(input logic [AW-1:0] ta, input logic [BW-1:0] tb,
                       input logic as, input logic bs, input logic [PW-1:0] tc);
    longint expv;
    logic [PW-1:0] expw;
    logic [BW:0] bx;
    a = ta; b = tb; a_signed = as; b_signed = bs; c = tc;
    #1;
    expv = sval(64'(ta), AW, as) * sval(64'(tb), BW, bs) + longint'(tc);
    expw = expv[PW-1:0];
    checks++;
    if (p !== expw) begin
      failures++;
      if (failures <= 10)
        $display("FAIL a=%h(%0d) b=%h(%0d) c=%h: p=%h expected %h", ta, as, tb, bs, tc, p, expw);
    end
    // mechanism bookkeeping, from the operands alone
    case ({as, bs})
      2'b11: n_ss++;
      2'b00: n_uu++;
      2'b10: n_su++;
      default: n_us++;
    endcase
    if (tc != '0) n_mac++;
    bx = {tb, 1'b0};
    for (int i = 0; i < BW / 2; i++) begin
      if (bx[2*i+2] && !(bx[2*i+1] && bx[2*i])) n_negdig++;
      if (bx[2*i+2] && bx[2*i+1] && bx[2*i]) n_negzero++;
    end
    if (!bs && tb[BW-1]) n_extra++;
  endtask

  initial begin : watchdog
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [AW-1:0] corners_a [6];
    logic [BW-1:0] corners_b [6];
    corners_a = '{16'h0000, 16'h0001, 16'h7fff, 16'h8000, 16'hffff, 16'h00ff};
    corners_b = '{16'h0000, 16'h0001, 16'h7fff, 16'h8000, 16'hffff, 16'hff00};
    for (int m = 0; m < 4; m++)
      for (int i = 0; i < 6; i++)
        for (int k = 0; k < 6; k++) begin
          apply(corners_a[i], corners_b[k], m[1], m[0], '0);
          apply(corners_a[i], corners_b[k], m[1], m[0], 32'hffff_ffff);
        end
    for (int n = 0; n < 40000; n++) begin
      apply(AW'($urandom), BW'($urandom), 1'($urandom), 1'($urandom),
            ($urandom_range(0, 1) == 1) ? PW'($urandom) : '0);
    end

    if (n_ss == 0)      begin failures++; $display("never: signed x signed"); end
    if (n_uu == 0)      begin failures++; $display("never: unsigned x unsigned"); end
    if (n_su == 0)      begin failures++; $display("never: signed x unsigned"); end
    if (n_us == 0)      begin failures++; $display("never: unsigned x signed"); end
    if (n_mac == 0)     begin failures++; $display("never: accumulate"); end
    if (n_negdig == 0)  begin failures++; $display("never: negative Booth digit"); end
    if (n_negzero == 0) begin failures++; $display("never: -0 Booth digit"); end
    if (n_extra == 0)   begin failures++; $display("never: extra unsigned digit"); end
    $display("mechanisms: ss=%0d uu=%0d su=%0d us=%0d mac=%0d negdigit=%0d minus0=%0d extra=%0d",
             n_ss, n_uu, n_su, n_us, n_mac, n_negdig, n_negzero, n_extra);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
