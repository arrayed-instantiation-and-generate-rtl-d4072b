// len_reg_tb: random increment and clear sequence on the 64-bit length
// register, compared every cycle with a model that adds 64 per increment.
// A preset near 2**64 is not reachable, so wrap-around is not exercised.
module len_reg_tb;
  logic clk = 0, rst, clr, inc;
  logic [63:0] len;
  longint unsigned model = 0;
  int checks = 0, failures = 0;

  len_reg dut (.clk(clk), .rst(rst), .clr(clr), .inc(inc), .len(len));

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
    else if (i) model += 64;
    #1;
    checks++;
    if (len != model) begin
      failures++;
      $display("len_reg: len=%0d expected %0d", len, model);
    end
  endtask

  initial begin
    rst = 1; clr = 0; inc = 0;
    @(posedge clk); #1;
    rst = 0;
    checks++;
    if (len !== '0) failures++;
    // the 'abcd0123' message is one packet: l = 64
    step(1, 0);
    step(0, 1);
    checks++;
    if (len !== 64'd64) failures++;
    for (int n = 0; n < 2000; n++) step(($urandom % 50) == 0, $urandom % 4 != 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
