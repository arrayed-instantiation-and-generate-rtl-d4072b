// ipu_dp_tb: end-to-end check of the SHA-256 input preprocessing datapath.
// The testbench plays the control unit: for a message of n 64-bit packets it
// clears the unit, stores the n message packets, one padding packet, the zero
// packets and the length packet, with random idle cycles (st_pkt low) between
// some of them. The expected padded message is built from the SHA-256 padding
// rule alone: word n is 8000...0, the last word of the last block is 64*n, the
// rest zeros, and the number of words is the smallest multiple of 8 that is at
// least n + 2. Each time the eighth packet of a block is stored, blk is compared
// with the expected block, and idx must be back at 0; idx is checked after every
// store. The first message is the 8-byte ASCII text "abcd0123", whose block is
// also compared with the literal 512-bit value worked out by hand; the second is
// a 72-character text that must give two blocks. Lengths 0..20 packets follow,
// covering the padding packet at every position of a block (position 7 pushes
// the length packet into an extra block). The block rate is checked as well:
// with no idle cycles a block is complete exactly 8 cycles after its first store.
module ipu_dp_tb;
  import ipu_pkg::*;

  logic clk = 0, rst = 1;
  pkt_t pkt = '0;
  logic st_pkt = 0, clr = 0, pad_pkt = 0, zero_pkt = 0, mlen_pkt = 0;
  logic [IDX_W-1:0] idx;
  blk_t blk;
  int checks = 0, failures = 0;
  int blocks_seen = 0, pad_at_last = 0;

  ipu_dp dut (.clk(clk), .rst(rst), .pkt(pkt), .st_pkt(st_pkt), .clr(clr), .pad_pkt(pad_pkt),
              .zero_pkt(zero_pkt), .mlen_pkt(mlen_pkt), .idx(idx), .blk(blk));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("ipu_dp: FAIL %s", what);
    end
  endtask

  // Send one message; msg holds its packets. idle_en allows random gaps.
  task automatic send(input pkt_t msg [$], input bit idle_en, output blk_t blocks [$]);
    int n = msg.size();
    int nw = ((n + 2 + 7) / 8) * 8;
    pkt_t exp_w [$];
    int stores = 0, first_cycle = 0, cyc = 0;
    blocks = {};
    for (int w = 0; w < nw; w++) begin
      if (w < n)            exp_w.push_back(msg[w]);
      else if (w == n)      exp_w.push_back(64'h8000_0000_0000_0000);
      else if (w == nw - 1) exp_w.push_back(64'(64 * n));
      else                  exp_w.push_back('0);
    end
    if (n % 8 == 7) pad_at_last++;
    // clear for one cycle
    @(negedge clk);
    clr = 1;
    @(negedge clk);
    clr = 0;
    check(idx == 0, "idx not 0 after clr");
    for (int w = 0; w < nw; w++) begin
      if (idle_en) begin
        while ($urandom % 4 == 0) @(negedge clk);
      end
      pkt      = (w < n) ? msg[w] : pkt_t'({$urandom, $urandom});   // garbage on pkt
      pad_pkt  = (w == n);
      zero_pkt = (w > n) && (w < nw - 1);
      mlen_pkt = (w == nw - 1);
      st_pkt   = 1;
      if (w % 8 == 0) first_cycle = $time / 10;
      @(negedge clk);
      st_pkt = 0; pad_pkt = 0; zero_pkt = 0; mlen_pkt = 0;
      stores++;
      check(int'(idx) == stores % 8, $sformatf("idx %0d after %0d stores", idx, stores));
      if (stores % 8 == 0) begin
        blk_t e;
        for (int j = 0; j < 8; j++) e[BLK_W-1-64*j -: 64] = exp_w[stores - 8 + j];
        check(blk == e, $sformatf("block %0d of %0d-packet message:\n got %h\n exp %h",
                                  stores / 8 - 1, n, blk, e));
        if (!idle_en) begin
          cyc = $time / 10 - first_cycle;
          check(cyc == 8, $sformatf("block took %0d cycles, expected 8", cyc));
        end
        blocks.push_back(blk);
        blocks_seen++;
      end
    end
    // the block stays while the unit is idle
    @(negedge clk);
    if (blocks.size() > 0) check(blk == blocks[$], "block not held");
  endtask

  initial begin
    pkt_t m [$];
    blk_t got [$];
    string txt;
    repeat (2) @(negedge clk);
    rst = 0;

    // "abcd0123": l = 64, one block
    m = {64'h6162636430313233};
    send(m, 0, got);
    check(got.size() == 1, "abcd0123 must give one block");
    check(got[0] == {64'h6162636430313233, 64'h8000000000000000, {5{64'h0}}, 64'h40},
          "abcd0123 block differs from the worked value");

    // 72-character text: 9 packets, two blocks
    txt = "Dear All, I am writing to give you an update on your submitted proposal.";
    m = {};
    for (int p = 0; p < txt.len() / 8; p++) begin
      pkt_t v;
      for (int b = 0; b < 8; b++) v[63 - 8*b -: 8] = txt[8*p + b];
      m.push_back(v);
    end
    send(m, 0, got);
    check(got.size() == 2, "72-character message must give two blocks");
    check(got[1][63:0] == 64'd576, "length packet of the 72-character message");

    // every message length from 0 to 20 packets, random data, with idle gaps
    for (int n = 0; n <= 20; n++) begin
      m = {};
      for (int p = 0; p < n; p++) m.push_back({$urandom, $urandom});
      send(m, n % 2 == 1, got);
    end
    check(pad_at_last > 0, "padding packet never in the last slot of a block");
    $display("ipu_dp_tb: %0d blocks checked", blocks_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
