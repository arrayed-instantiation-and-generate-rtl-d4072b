// ami_top_tb: end-to-end test of the whole design at its default parameters.
// Converters: all 10000 four-digit BCD numbers go to both converter forms; each
// output is compared with the digit-wise (digit + 3) value worked out here, and
// the two forms with each other.
// IPU datapath: the testbench acts as the control unit and sends messages of
// 0..17 packets plus the "abcd0123" example, building the expected padded blocks
// from the SHA-256 padding rule. It counts how often each mechanism of the
// datapath occurs and fails if one never does: message, padding, zero and
// length packets, a completed block, the counter wrap, a clear, a multi-block
// message, the padding packet landing in a block's last slot (which moves the
// length packet into an extra block), and idle cycles in which blk must hold.
// It also checks the rate: one packet per cycle, a block every 8 cycles.
module ami_top_tb;
  import ipu_pkg::*;

  localparam int K = 4;
  logic [4*K-1:0] bcd, e3_arr, e3_gen;
  logic clk = 0, rst = 1;
  pkt_t pkt = '0;
  logic st_pkt = 0, clr = 0, pad_pkt = 0, zero_pkt = 0, mlen_pkt = 0;
  logic [IDX_W-1:0] idx;
  blk_t blk;
  int checks = 0, failures = 0;
  int n_msg = 0, n_pad = 0, n_zero = 0, n_len = 0, n_blk = 0, n_wrap = 0, n_clr = 0;
  int n_multi = 0, n_pad_last = 0, n_idle = 0, n_conv = 0;

  ami_top dut (.bcd(bcd), .e3_arr(e3_arr), .e3_gen(e3_gen), .clk(clk), .rst(rst), .pkt(pkt),
               .st_pkt(st_pkt), .clr(clr), .pad_pkt(pad_pkt), .zero_pkt(zero_pkt),
               .mlen_pkt(mlen_pkt), .idx(idx), .blk(blk));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("ami_top: FAIL %s", what);
    end
  endtask

  task automatic send(input pkt_t msg [$], input bit idle_en);
    int n = msg.size();
    int nw = ((n + 2 + 7) / 8) * 8;
    int stores = 0;
    longint t0 = 0;
    pkt_t exp_w [$];
    for (int w = 0; w < nw; w++) begin
      if (w < n)            exp_w.push_back(msg[w]);
      else if (w == n)      exp_w.push_back(64'h8000_0000_0000_0000);
      else if (w == nw - 1) exp_w.push_back(64'(64 * n));
      else                  exp_w.push_back('0);
    end
    if (nw > 8) n_multi++;
    if (n % 8 == 7) n_pad_last++;
    @(negedge clk);
    clr = 1;
    @(negedge clk);
    clr = 0;
    n_clr++;
    check(idx == 0, "idx after clr");
    for (int w = 0; w < nw; w++) begin
      if (idle_en) begin
        while ($urandom % 3 == 0) begin
          blk_t held = blk;
          @(negedge clk);
          n_idle++;
          check(blk == held, "blk changed in an idle cycle");
        end
      end
      if (w % 8 == 0) t0 = $time;
      pkt      = (w < n) ? msg[w] : pkt_t'({$urandom, $urandom});
      pad_pkt  = (w == n);
      zero_pkt = (w > n) && (w < nw - 1);
      mlen_pkt = (w == nw - 1);
      if (w < n) n_msg++;
      else if (w == n) n_pad++;
      else if (w == nw - 1) n_len++;
      else n_zero++;
      st_pkt = 1;
      @(negedge clk);
      st_pkt = 0; pad_pkt = 0; zero_pkt = 0; mlen_pkt = 0;
      stores++;
      check(int'(idx) == stores % 8, $sformatf("idx %0d after %0d stores", idx, stores));
      if (stores % 8 == 0) begin
        blk_t e;
        for (int j = 0; j < 8; j++) e[BLK_W-1-64*j -: 64] = exp_w[stores - 8 + j];
        check(blk == e, $sformatf("block %0d of a %0d-packet message", stores / 8 - 1, n));
        if (!idle_en) check(($time - t0) == 80, "a block must take 8 cycles");
        n_blk++;
        if (idx == 0) n_wrap++;
      end
    end
  endtask

  initial begin
    pkt_t m [$];
    // converters
    for (int v = 0; v < 10000; v++) begin
      logic [4*K-1:0] e;
      int r;
      r = v;
      for (int d = 0; d < K; d++) begin
        bcd[4*d +: 4] = 4'(r % 10);
        e[4*d +: 4]   = 4'(r % 10 + 3);
        r /= 10;
      end
      #1;
      check(e3_arr == e, $sformatf("arrayed converter %h -> %h", bcd, e3_arr));
      check(e3_gen == e, $sformatf("generate converter %h -> %h", bcd, e3_gen));
      n_conv++;
    end

    // IPU
    repeat (2) @(negedge clk);
    rst = 0;
    m = {64'h6162636430313233};
    send(m, 0);
    check(blk == {64'h6162636430313233, 64'h8000000000000000, {5{64'h0}}, 64'h40},
          "abcd0123 block");
    for (int n = 0; n <= 17; n++) begin
      m = {};
      for (int p = 0; p < n; p++) m.push_back({$urandom, $urandom});
      send(m, n % 3 == 2);
    end

    $display("ami_top_tb: conversions=%0d msg=%0d pad=%0d zero=%0d len=%0d blocks=%0d wraps=%0d",
             n_conv, n_msg, n_pad, n_zero, n_len, n_blk, n_wrap);
    $display("ami_top_tb: clears=%0d multi_block=%0d pad_in_last_slot=%0d idle=%0d",
             n_clr, n_multi, n_pad_last, n_idle);
    check(n_conv > 0, "no conversion");
    check(n_msg > 0, "no message packet");
    check(n_pad > 0, "no padding packet");
    check(n_zero > 0, "no zero packet");
    check(n_len > 0, "no length packet");
    check(n_blk > 0, "no block");
    check(n_wrap > 0, "counter never wrapped");
    check(n_clr > 0, "no clear");
    check(n_multi > 0, "no multi-block message");
    check(n_pad_last > 0, "padding packet never in the last slot");
    check(n_idle > 0, "no idle cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
