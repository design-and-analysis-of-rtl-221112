// Exhaustive test of the full adder: all eight input triples, sum and carry
// compared with the arithmetic sum x + y + z.
`timescale 1ns/1ps
module tb_full_adder;
  int checks = 0;
  int failures = 0;

  logic x, y, z, sum, carry;
  full_adder dut (.x(x), .y(y), .z(z), .sum(sum), .carry(carry));
  initial begin
    for (int v = 0; v < 8; v++) begin
      {z, y, x} = 3'(v);
      #1;
      checks++;
      if ({carry, sum} !== 2'(int'(x) + int'(y) + int'(z))) begin
        failures++;
        $display("FAIL x=%0b y=%0b z=%0b -> carry=%0b sum=%0b", x, y, z, carry, sum);
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
