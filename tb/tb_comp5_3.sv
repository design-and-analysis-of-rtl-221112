// Exhaustive test of the 5-3 compressor: every one of the 2^5 input
// patterns; the 3-bit output must equal the number of ones in x.
`timescale 1ns/1ps
module tb_comp5_3;
  int checks = 0;
  int failures = 0;

  logic [5-1:0] x;
  logic [3-1:0] s;
  comp5_3 dut (.x(x), .s(s));
  initial begin
    for (int v = 0; v < (1 << 5); v++) begin
      x = 5'(v);
      #1;
      checks++;
      if (int'(s) != $countones(x)) begin
        failures++;
        if (failures < 10) $display("FAIL x=%b -> s=%0d", x, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // Watchdog: ends the run with a failure if the stimulus never finishes.
  initial begin
    #(100);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
