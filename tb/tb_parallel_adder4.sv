// Exhaustive test of the 4-bit parallel adder: all 256 operand pairs,
// s compared with (a + b) mod 16.
`timescale 1ns/1ps
module tb_parallel_adder4;
  int checks = 0;
  int failures = 0;

  logic [3:0] a, b, s;
  parallel_adder4 dut (.a(a), .b(b), .s(s));
  initial begin
    for (int v = 0; v < 256; v++) begin
      {a, b} = 8'(v);
      #1;
      checks++;
      if (s !== 4'((int'(a) + int'(b)) % 16)) begin
        failures++;
        $display("FAIL a=%0d b=%0d -> s=%0d", a, b, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // Watchdog: ends the run with a failure if the stimulus never finishes.
  initial begin
    #(10000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
