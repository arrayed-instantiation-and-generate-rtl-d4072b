// cntr: W-bit up counter with synchronous clear.
// In the IPU it provides the next free address of the register file: it counts
// the packets stored so far in the current block and wraps from 2**W-1 back to 0,
// so that the ninth packet starts a new block at address 0.
// Timing: q changes on the rising edge of clk. rst and clr both clear it and take
// priority over inc (rst and the priority are this design's choice).
module cntr #(
  parameter int unsigned W = 3                      // counter width
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         clr,
  input  logic         inc,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (rst || clr) q <= '0;
    else if (inc)   q <= q + 1'b1;
  end
endmodule
