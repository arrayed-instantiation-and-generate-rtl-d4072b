// pktmux: packet multiplexer of the IPU.
// Chooses the packet written into the register file among the four packet types
// of a padded message:
//   pad_pkt  : padding packet, a 1 in the most significant bit then zeros
//   zero_pkt : zero packet, all zeros
//   mlen_pkt : message length packet, the value on ms_len
//   none     : the message packet on pkt
// The three controls are mutually exclusive by contract (ipu_dp asserts this);
// should several be high anyway, pad_pkt wins over zero_pkt over mlen_pkt, which
// is this design's choice. Combinational.
module pktmux
  import ipu_pkg::*;
#(
  parameter int unsigned W = PKT_W                  // packet width
) (
  input  logic [W-1:0] pkt,
  input  logic [W-1:0] ms_len,
  input  logic         pad_pkt,
  input  logic         zero_pkt,
  input  logic         mlen_pkt,
  output logic [W-1:0] o
);
  always_comb begin
    if (pad_pkt)       o = {1'b1, {(W-1){1'b0}}};
    else if (zero_pkt) o = '0;
    else if (mlen_pkt) o = ms_len;
    else               o = pkt;
  end
endmodule
