// tb_cpa: self-checking test of the 32-bit carry-propagate adder: random
// and corner operands with both carry-in values, compared with a 33-bit sum
// computed here.
module tb_cpa;
  localparam int W = 32;

  logic [W-1:0] x, y, s;
  logic         ci, co;

  int checks = 0;
  int failures = 0;

  cpa #(.W(W)) dut (.*);

  task automatic apply(input logic [W-1:0] tx, input logic [W-1:0] ty, input logic tc);
    longint want;
    x = tx; y = ty; ci = tc;
    #1;
    want = longint'(tx) + longint'(ty) + longint'(tc);
    checks++;
    if ({co, s} !== want[W:0]) begin
      failures++;
      if (failures <= 10) $display("FAIL %h + %h + %b = %b_%h", tx, ty, tc, co, s);
    end
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('1, '0, 1'b1);
    apply('1, '1, 1'b1);
    apply('0, '0, 1'b0);
    apply(32'h8000_0000, 32'h8000_0000, 1'b0);
    for (int n = 0; n < 20000; n++) apply(W'($urandom), W'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
