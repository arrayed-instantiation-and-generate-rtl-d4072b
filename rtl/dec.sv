// dec: binary to one-hot decoder with enable.
// Output bit s of y is 1 when en is 1; all outputs are 0 when en is 0. The width
// of the selection input is the parameter W (the register file uses W = 3, giving
// eight write strobes). Combinational.
// The enable input is this design's choice: it is how the register file's write
// enable gates the decoded strobes.
module dec #(
  parameter int unsigned W = 3                      // selection width
) (
  input  logic [W-1:0]      s,
  input  logic              en,
  output logic [2**W-1:0]   y
);
  always_comb begin
    y    = '0;
    y[s] = en;
  end
endmodule
