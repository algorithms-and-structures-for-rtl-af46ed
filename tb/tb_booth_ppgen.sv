// tb_booth_ppgen: exhaustive self-checking test of one Booth partial-product
// row for an 8-bit multiplicand slice. For every slice value, lower
// neighbour bit, position, signedness and Booth digit (0, +-1, +-2, -0) the
// row is compared with |digit| * slice (the slice extended with sign or zero
// in the top position, the neighbour bit shifted in for |digit| = 2),
// inverted for negative digits, computed here with integer arithmetic.
module tb_booth_ppgen;
  import mbx_pkg::*;
  localparam int N = 8;

  logic [N-1:0] a;
  logic         a_below, a_msb, a_signed;
  booth_sel_t   sel;
  logic [N+1:0] pp;

  int checks = 0;
  int failures = 0;

  booth_ppgen #(.N(N)) dut (.*);

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // select codes: {neg, two, one}
    logic [2:0] codes [6];
    codes = '{3'b000, 3'b001, 3'b010, 3'b101, 3'b110, 3'b100};
    for (int v = 0; v < 2 ** N; v++)
      for (int m = 0; m < 8; m++)
        for (int c = 0; c < 6; c++) begin
          int aext, mag;
          logic [N+1:0] want;
          a = N'(v); a_below = m[0]; a_msb = m[1]; a_signed = m[2];
          sel = booth_sel_t'(codes[c]);
          #1;
          aext = (a_msb && a_signed && a[N-1]) ? v - 2 ** N : v;
          mag  = sel.one ? aext : (sel.two ? 2 * aext + int'(a_below) : 0);
          want = (N + 2)'(mag);
          if (sel.neg) want = ~want;
          if (!a_msb) want[N+1:N] = 2'b00;
          checks++;
          if (pp !== want) begin
            failures++;
            if (failures <= 10)
              $display("FAIL a=%h below=%b msb=%b signed=%b sel=%b: pp=%b want %b",
                       a, a_below, a_msb, a_signed, codes[c], pp, want);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
