// Exhaustive test of the half adder: all four input pairs, sum and carry
// compared with the arithmetic sum x + y.
`timescale 1ns/1ps
module tb_half_adder;
  int checks = 0;
  int failures = 0;

  logic x, y, sum, carry;
  half_adder dut (.x(x), .y(y), .sum(sum), .carry(carry));
  initial begin
    for (int v = 0; v < 4; v++) begin
      {y, x} = 2'(v);
      #1;
      checks++;
      if ({carry, sum} !== 2'(int'(x) + int'(y))) begin
        failures++;
        $display("FAIL x=%0b y=%0b -> carry=%0b sum=%0b", x, y, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // Watchdog: ends the run with a failure if the stimulus never finishes.
  initial begin
    #(1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
