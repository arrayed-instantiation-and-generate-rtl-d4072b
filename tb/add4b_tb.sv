// add4b_tb: exhaustive check of the 4-bit adder. All 256 operand pairs are
// applied and z is compared with (x + y) mod 16 computed in the testbench.
module add4b_tb;
  logic [3:0] x, y, z;
  int checks = 0, failures = 0;

  add4b dut (.x(x), .y(y), .z(z));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 16; a++) begin
      for (int b = 0; b < 16; b++) begin
        x = 4'(a); y = 4'(b);
        #1;
        checks++;
        if (int'(z) != (a + b) % 16) begin
          failures++;
          $display("add4b: %0d + %0d gave %0d", a, b, z);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
