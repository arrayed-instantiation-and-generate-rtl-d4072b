// pktmux_tb: applies random message packets and lengths with each of the four
// packet-type selections (none, pad, zero, length) and compares the output with
// the packet expected for that type.
module pktmux_tb;
  logic [63:0] pkt, ms_len, o, exp_o;
  logic pad_pkt, zero_pkt, mlen_pkt;
  int checks = 0, failures = 0;

  pktmux dut (.pkt(pkt), .ms_len(ms_len), .pad_pkt(pad_pkt), .zero_pkt(zero_pkt),
              .mlen_pkt(mlen_pkt), .o(o));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      int sel;
      sel = n % 4;
      pkt    = {$urandom, $urandom};
      ms_len = {$urandom, $urandom};
      pad_pkt  = (sel == 1);
      zero_pkt = (sel == 2);
      mlen_pkt = (sel == 3);
      case (sel)
        0: exp_o = pkt;
        1: exp_o = 64'h8000_0000_0000_0000;
        2: exp_o = 64'h0;
        default: exp_o = ms_len;
      endcase
      #1;
      checks++;
      if (o !== exp_o) begin
        failures++;
        $display("pktmux: sel=%0d o=%h expected %h", sel, o, exp_o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
