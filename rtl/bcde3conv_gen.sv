// bcde3conv_gen: k-digit BCD8421 to Excess-3 converter, generate-loop form.
// Same function as bcde3conv (each digit plus 3), but the k add4b instances are
// created by a generate for loop over a genvar. Iteration i lives in the named
// block g_digit[i] and wires the part-select [4*i+3 : 4*i] of bcd and e3 to its
// adder; the 4-bit constant 3 is the second operand of every adder.
// Combinational, no clock. Interface as bcde3conv.
// The loop structure follows the reference description; the module name differs
// from bcde3conv only so that both forms can be used in one design.
module bcde3conv_gen #(
  parameter int unsigned k = 4                      // number of decimal digits
) (
  input  logic [4*k-1:0] bcd,
  output logic [4*k-1:0] e3
);
  localparam logic [3:0] E3_BIAS = 4'd3;

  for (genvar i = 0; i < k; i++) begin : g_digit
    add4b u_add (
      .x (bcd[4*i +: 4]),
      .y (E3_BIAS),
      .z (e3[4*i +: 4])
    );
  end
endmodule
