// cntr_tb: random increment and clear sequence on the 3-bit counter, compared
// every cycle with an integer model (count modulo 8, clear first). Also checks
// the wrap from 7 to 0 after eight consecutive increments.
module cntr_tb;
  localparam int W = 3;
  logic clk = 0, rst, clr, inc;
  logic [W-1:0] q;
  int model = 0;
  int checks = 0, failures = 0;

  cntr dut (.clk(clk), .rst(rst), .clr(clr), .inc(inc), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic c, input logic i);
    clr = c; inc = i;
    @(posedge clk);
    if (c) model = 0;
    else if (i) model = (model + 1) % (2**W);
    #1;
    checks++;
    if (int'(q) != model) begin
      failures++;
      $display("cntr: q=%0d expected %0d", q, model);
    end
  endtask

  initial begin
    rst = 1; clr = 0; inc = 0;
    @(posedge clk); #1;
    rst = 0;
    model = 0;
    checks++;
    if (q !== '0) failures++;
    for (int n = 0; n < 2**W; n++) step(0, 1);
    checks++;
    if (q !== '0) begin failures++; $display("cntr: no wrap after %0d increments", 2**W); end
    for (int n = 0; n < 1000; n++) step(($urandom % 10) == 0, $urandom % 2 == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
