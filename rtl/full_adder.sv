// full_adder: a (3,2) counter, the only cell of the carry-save reduction.
// Outputs the binary count of ones on x, y and z: s is the weight-1 bit,
// co the weight-2 bit. Purely combinational.
module full_adder (
  input  logic x,
  input  logic y,
  input  logic z,
  output logic s,
  output logic co
);
  assign s  = x ^ y ^ z;
  assign co = (x & y) | (x & z) | (y & z);
endmodule
