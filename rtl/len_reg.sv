// len_reg: message length register of the IPU.
// A W-bit register that holds the number of message bits received so far. Every
// stored message packet adds STEP (the packet width, 64) to it, so after the last
// message packet it holds l, the value the length packet carries.
// Timing: len changes on the rising edge of clk. rst and clr clear it and take
// priority over inc (the priority is this design's choice). The sum wraps modulo
// 2**W, as SHA-256 defines l on 64 bits.
module len_reg #(
  parameter int unsigned W    = 64,                 // register width
  parameter int unsigned STEP = 64                  // bits added per message packet
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         clr,
  input  logic         inc,
  output logic [W-1:0] len
);
  always_ff @(posedge clk) begin
    if (rst || clr) len <= '0;
    else if (inc)   len <= len + W'(STEP);
  end
endmodule
