// add4b: 4-bit adder, z = x + y modulo 16.
// Purely combinational. It is the building block that the BCD8421 to Excess-3
// converters replicate once per decimal digit. Only the ports x, y and z are used
// by those converters, so the adder has no carry in or carry out; that choice is
// this design's, the converters only need the low four bits (a BCD digit plus 3
// is at most 12).
module add4b (
  input  logic [3:0] x,
  input  logic [3:0] y,
  output logic [3:0] z
);
  always_comb z = x + y;
endmodule
