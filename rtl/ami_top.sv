// ami_top: the two example designs side by side.
//  * A k-digit BCD8421 to Excess-3 converter, present twice so the two ways of
//    replicating its add4b adders can be compared: bcde3conv (one arrayed
//    instance) drives e3_arr and bcde3conv_gen (a generate loop) drives e3_gen.
//    Both read the same bcd input and must give the same result. Combinational.
//  * The SHA-256 input preprocessing unit datapath ipu_dp. Its control inputs
//    (st_pkt, clr, pad_pkt, zero_pkt, mlen_pkt) are ports, to be driven by a
//    control unit that sequences the packets of a message; idx and the 512-bit
//    padded block blk are outputs. Timing as in ipu_dp.
// Sharing the bcd input between the two converters is this design's choice.
module ami_top
  import ipu_pkg::*;
#(
  parameter int unsigned K = 4                      // BCD digits
) (
  input  logic [4*K-1:0]   bcd,
  output logic [4*K-1:0]   e3_arr,
  output logic [4*K-1:0]   e3_gen,
  input  logic             clk,
  input  logic             rst,
  input  pkt_t             pkt,
  input  logic             st_pkt,
  input  logic             clr,
  input  logic             pad_pkt,
  input  logic             zero_pkt,
  input  logic             mlen_pkt,
  output logic [IDX_W-1:0] idx,
  output blk_t             blk
);
  bcde3conv     #(.k(K)) u_conv_arr (.bcd(bcd), .e3(e3_arr));
  bcde3conv_gen #(.k(K)) u_conv_gen (.bcd(bcd), .e3(e3_gen));

  ipu_dp u_ipu (
    .clk      (clk),
    .rst      (rst),
    .pkt      (pkt),
    .st_pkt   (st_pkt),
    .clr      (clr),
    .pad_pkt  (pad_pkt),
    .zero_pkt (zero_pkt),
    .mlen_pkt (mlen_pkt),
    .idx      (idx),
    .blk      (blk)
  );
endmodule
