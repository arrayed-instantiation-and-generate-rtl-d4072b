// ipu_dp: datapath of the SHA-256 input preprocessing unit (IPU).
// The IPU turns a message of l bits (l a multiple of 64) into 512-bit blocks of
// the padded message: the message, a 1 bit, zeros up to 448 mod 512, then l on 64
// bits. Because l is a multiple of 64, everything after the message falls into
// whole 64-bit packets of three kinds: one padding packet (1 then 63 zeros), zero
// packets and one length packet. The datapath therefore handles four packet
// types and a control unit (outside this module) chooses one per cycle:
//   pktmux  picks the message packet pkt, the padding packet, a zero packet, or
//           the length packet, by the mutually exclusive pad_pkt/zero_pkt/mlen_pkt;
//   regfl   8 x 64-bit register file; st_pkt writes the chosen packet at idx;
//   cntr    3-bit counter of stored packets, the next free address idx; it wraps
//           after 8 packets, when blk holds a complete block;
//   len_reg 64-bit register adding 64 for each stored message packet, giving l.
// Timing: one packet per cycle. A packet stored on a clock edge is in blk and
// counted in idx right after that edge; a block is complete in the cycle after
// the eighth store, when idx is back at 0, and stays until the next store.
// clr clears the counter and the length register (not the register file). The
// structure follows the reference description. This design's own choices: rst
// clears every register, and the length register counts only message packets
// (st_pkt with no other packet selected), since it must hold l.
module ipu_dp
  import ipu_pkg::*;
(
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
  pkt_t ms_len;
  pkt_t mux_out;
  logic msg_st;

  assign msg_st = st_pkt && !(pad_pkt || zero_pkt || mlen_pkt);

  pktmux #(.W(PKT_W)) u_pktmux (
    .pkt      (pkt),
    .ms_len   (ms_len),
    .pad_pkt  (pad_pkt),
    .zero_pkt (zero_pkt),
    .mlen_pkt (mlen_pkt),
    .o        (mux_out)
  );

  cntr #(.W(IDX_W)) u_cntr (
    .clk (clk),
    .rst (rst),
    .clr (clr),
    .inc (st_pkt),
    .q   (idx)
  );

  len_reg #(.W(PKT_W), .STEP(PKT_W)) u_len (
    .clk (clk),
    .rst (rst),
    .clr (clr),
    .inc (msg_st),
    .len (ms_len)
  );

  regfl #(.W(PKT_W), .AW(IDX_W)) u_regfl (
    .clk (clk),
    .rst (rst),
    .d   (mux_out),
    .s   (idx),
    .we  (st_pkt),
    .q   (blk)
  );

  // The packet-type selects are mutually exclusive.
  a_sel_onehot : assert property (@(posedge clk) disable iff (rst)
    $onehot0({pad_pkt, zero_pkt, mlen_pkt}))
    else $error("ipu_dp: more than one packet type selected");
endmodule
