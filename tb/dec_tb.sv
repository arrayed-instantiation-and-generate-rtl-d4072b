// dec_tb: exhaustive check of the 3-bit decoder (W = 3): for every selection
// value with the enable high exactly bit s of y is set; with it low y is 0.
module dec_tb;
  localparam int W = 3;
  logic [W-1:0]    s;
  logic            en;
  logic [2**W-1:0] y;
  int checks = 0, failures = 0;

  dec dut (.s(s), .en(en), .y(y));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int v = 0; v < 2**W; v++) begin
        logic [2**W-1:0] exp_y;
        s = W'(v); en = e[0];
        exp_y = (e == 1) ? (2**W)'(1 << v) : '0;
        #1;
        checks++;
        if (y !== exp_y) begin
          failures++;
          $display("dec: s=%0d en=%0d y=%b expected %b", v, e, y, exp_y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
