// regfl_tb: random writes to the 8 x 64 register file, with the write enable
// low one cycle in four. After every cycle the 512-bit output is compared with a
// model array, register 0 expected in the most significant 64 bits.
module regfl_tb;
  logic clk = 0, rst, we;
  logic [63:0] d;
  logic [2:0]  s;
  logic [511:0] q, exp_q;
  logic [63:0] model [8];
  int checks = 0, failures = 0;

  regfl dut (.clk(clk), .rst(rst), .d(d), .s(s), .we(we), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int j = 0; j < 8; j++) exp_q[511 - 64*j -: 64] = model[j];
    checks++;
    if (q !== exp_q) begin
      failures++;
      if (failures < 10) $display("regfl: q=%h\n expected %h", q, exp_q);
    end
  endtask

  initial begin
    rst = 1; we = 0; d = '0; s = '0;
    for (int j = 0; j < 8; j++) model[j] = '0;
    @(posedge clk); #1;
    rst = 0;
    compare();
    // fill in address order with recognisable data: register j holds j+1 in every byte
    for (int j = 0; j < 8; j++) begin
      d = {8{8'(j + 1)}}; s = 3'(j); we = 1;
      @(posedge clk); #1;
      model[j] = d;
      compare();
    end
    checks++;
    if (q[511 -: 64] !== {8{8'h01}} || q[63:0] !== {8{8'h08}}) failures++;
    for (int n = 0; n < 1000; n++) begin
      d = {$urandom, $urandom}; s = 3'($urandom); we = ($urandom % 4) != 0;
      @(posedge clk); #1;
      if (we) model[s] = d;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
