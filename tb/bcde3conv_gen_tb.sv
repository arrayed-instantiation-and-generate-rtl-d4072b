// bcde3conv_gen_tb: checks the k-digit BCD8421 to Excess-3 converter at its default
// k = 4. Every 4-digit decimal number 0000..9999 is applied; the expected output
// is built digit by digit as (decimal digit + 3), independently of the adders.
// A further set of random non-BCD inputs checks the modulo-16 behaviour.
module bcde3conv_gen_tb;
  localparam int K = 4;
  logic [4*K-1:0] bcd, e3, exp_e3;
  int checks = 0, failures = 0;

  bcde3conv_gen dut (.bcd(bcd), .e3(e3));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [4*K-1:0] v);
    bcd = v;
    for (int d = 0; d < K; d++) exp_e3[4*d +: 4] = 4'((int'(v[4*d +: 4]) + 3) % 16);
    #1;
    checks++;
    if (e3 !== exp_e3) begin
      failures++;
      if (failures < 10) $display("bcde3conv_gen: bcd=%h e3=%h expected %h", v, e3, exp_e3);
    end
  endtask

  initial begin
    for (int n = 0; n < 10000; n++) begin
      logic [4*K-1:0] v;
      int r;
      r = n;
      for (int d = 0; d < K; d++) begin
        v[4*d +: 4] = 4'(r % 10);
        r /= 10;
      end
      check(v);
    end
    // spot check against hand-worked values: 1995 -> 4CC8, 0000 -> 3333
    check(16'h1995);
    checks++;
    if (e3 !== 16'h4CC8) failures++;
    check(16'h0000);
    checks++;
    if (e3 !== 16'h3333) failures++;
    for (int n = 0; n < 200; n++) check((4*K)'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
