// regfl: register file that assembles packets into a block.
// 2**AW registers of W bits (8 x 64 in the IPU). A dec#(AW) decoder, enabled by
// we, turns the address s into one write strobe per register; on the rising edge
// of clk the selected register takes d. The output q is every register side by
// side, register 0 in the most significant bits and the last register in the
// least significant bits, so that packets stored at addresses 0..7 appear in
// message order in the 512-bit block.
// Timing: a write is visible on q one cycle later. rst clears all registers; the
// reset is this design's choice.
module regfl #(
  parameter int unsigned W  = 64,                   // register width
  parameter int unsigned AW = 3                     // address width
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [W-1:0]         d,
  input  logic [AW-1:0]        s,
  input  logic                 we,
  output logic [W*(2**AW)-1:0] q
);
  localparam int unsigned N = 2**AW;

  logic [N-1:0]   wstb;
  logic [W-1:0]   r [N];

  dec #(.W(AW)) u_dec (.s(s), .en(we), .y(wstb));

  for (genvar j = 0; j < N; j++) begin : g_reg
    always_ff @(posedge clk) begin
      if (rst)          r[j] <= '0;
      else if (wstb[j]) r[j] <= d;
    end
    assign q[W*(N-1-j) +: W] = r[j];
  end
endmodule
