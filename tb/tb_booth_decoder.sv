// tb_booth_decoder: exhaustive self-checking test of the radix-4 Booth
// recoder for one 8-bit multiplier slice. For every slice value, lower
// neighbour bit, position and signedness it checks each digit against
// -2*b[2i+1] + b[2i] + b[2i-1] worked out here, checks that the digits
// weighted by 4^i (plus the extra digit at 2^N) give back the slice value,
// and that a disabled decoder drives all select lines low.
module tb_booth_decoder;
  import mbx_pkg::*;
  localparam int N = 8;

  logic               en, b_below, b_msb, b_signed;
  logic [N-1:0]       b;
  booth_sel_t [N/2:0] sel;

  int checks = 0;
  int failures = 0;

  booth_decoder #(.N(N)) dut (.*);

  function automatic int digit_of(input booth_sel_t s);
    int v;
    v = (s.one ? 1 : 0) + (s.two ? 2 : 0);
    return s.neg ? -v : v;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10)
        $display("FAIL %s: b=%h below=%b msb=%b signed=%b en=%b", what, b, b_below, b_msb, b_signed, en);
    end
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int v = 0; v < 2 ** N; v++)
        for (int m = 0; m < 8; m++) begin
          int total, want, d;
          logic [N:0] bx;
          en = e[0]; b = N'(v); b_below = m[0]; b_msb = m[1]; b_signed = m[2];
          #1;
          bx = {b, b_below};
          total = 0;
          for (int i = 0; i < N / 2; i++) begin
            d = -2 * int'(bx[2*i+2]) + int'(bx[2*i+1]) + int'(bx[2*i]);
            check(!(sel[i].one && sel[i].two), "one and two both set");
            check(digit_of(sel[i]) == (en ? d : 0), $sformatf("digit %0d", i));
            total += digit_of(sel[i]) * (4 ** i);
          end
          total += digit_of(sel[N/2]) * (2 ** N);
          // slice value read as signed, plus the borrowed bit below, plus
          // the extra digit that restores an unsigned top slice
          want = v - ((v >> (N - 1)) << N) + int'(b_below);
          if (b_msb && !b_signed) want += int'(b[N-1]) << N;
          check(total == (en ? want : 0), "recoded value");
          check(sel[N/2].neg == 1'b0 && sel[N/2].two == 1'b0, "extra digit range");
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
