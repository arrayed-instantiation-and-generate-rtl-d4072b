// ipu_pkg: sizes and types shared by the SHA-256 input preprocessing unit (IPU)
// datapath. A message arrives in 64-bit packets and eight packets make one
// 512-bit block of the padded message. Because the message length is a multiple
// of 64 bits, the padding (a 1, zeros, then the 64-bit length) also splits into
// whole packets; the padding packet itself is formed in pktmux.
package ipu_pkg;
  localparam int unsigned PKT_W = 64;              // packet width in bits
  localparam int unsigned NPKT  = 8;               // packets per 512-bit block
  localparam int unsigned IDX_W = $clog2(NPKT);    // register file address width
  localparam int unsigned BLK_W = PKT_W * NPKT;    // block width in bits

  typedef logic [PKT_W-1:0] pkt_t;
  typedef logic [BLK_W-1:0] blk_t;
endpackage
