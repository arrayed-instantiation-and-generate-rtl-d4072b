// bcde3conv: k-digit BCD8421 to Excess-3 (E3) converter, arrayed-instance form.
// Each decimal digit's Excess-3 code is its BCD code plus 3, so the converter is
// k independent 4-bit adders. They are built with a single arrayed instantiation
// of add4b: the 4*k-bit buses bcd and e3 are k times the width of the x and z
// ports and are therefore split into 4-bit slices, one per instance (instance i
// gets bits 4*i+3..4*i), while the 4-bit constant 3 has the width of port y and is
// shared by all instances. Combinational, no clock.
// Interface: bcd[4*k-1:0] in, e3[4*k-1:0] out, digit i in bits 4*i+3..4*i.
// The structure and the default k = 4 follow the reference description; the
// behaviour for non-BCD digits (10..15 give digit+3 modulo 16) is the adder's.
module bcde3conv #(
  parameter int unsigned k = 4                      // number of decimal digits
) (
  input  logic [4*k-1:0] bcd,
  output logic [4*k-1:0] e3
);
  localparam logic [3:0] E3_BIAS = 4'd3;

  add4b u_digit [k-1:0] (
    .x (bcd),
    .y (E3_BIAS),
    .z (e3)
  );
endmodule
