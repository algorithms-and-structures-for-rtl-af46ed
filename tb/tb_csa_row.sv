// tb_csa_row: self-checking test of a carry-save adder row. Exhaustive for a
// 3-bit row and random for a 16-bit row: checks that x + y + z equals
// s + 2*c, and, bit by bit, that s is the parity and c the majority of the
// three inputs.
module tb_csa_row;
  localparam int WS = 3;
  localparam int WL = 16;

  logic [WS-1:0] xs, ys, zs, ss, cs;
  logic [WL-1:0] xl, yl, zl, sl, cl;

  int checks = 0;
  int failures = 0;

  csa_row #(.W(WS)) dut_s (.x(xs), .y(ys), .z(zs), .s(ss), .c(cs));
  csa_row #(.W(WL)) dut_l (.x(xl), .y(yl), .z(zl), .s(sl), .c(cl));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2 ** (3 * WS); v++) begin
      {xs, ys, zs} = (3 * WS)'(v);
      #1;
      checks++;
      if (int'(xs) + int'(ys) + int'(zs) != int'(ss) + 2 * int'(cs)) begin
        failures++;
        $display("FAIL small x=%b y=%b z=%b s=%b c=%b", xs, ys, zs, ss, cs);
      end
    end
    for (int n = 0; n < 20000; n++) begin
      xl = WL'($urandom); yl = WL'($urandom); zl = WL'($urandom);
      #1;
      checks++;
      if (int'(xl) + int'(yl) + int'(zl) != int'(sl) + 2 * int'(cl) ||
          sl !== (xl ^ yl ^ zl) || cl !== ((xl & yl) | (xl & zl) | (yl & zl))) begin
        failures++;
        if (failures <= 10) $display("FAIL wide x=%h y=%h z=%h s=%h c=%h", xl, yl, zl, sl, cl);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
