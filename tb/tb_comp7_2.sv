// Exhaustive test of the 7-2 compressor: all 1024 patterns of x[7:0], cin1,
// cin2; checks that s + 2*c1 + 4*(c0 + c2) equals the number of ones in.
`timescale 1ns/1ps
module tb_comp7_2;
  int checks = 0;
  int failures = 0;

  logic [7:0] x;
  logic cin1, cin2, s, c0, c1, c2;
  comp7_2 dut (.x(x), .cin1(cin1), .cin2(cin2), .s(s), .c0(c0), .c1(c1), .c2(c2));
  initial begin
    for (int v = 0; v < 1024; v++) begin
      {cin2, cin1, x} = 10'(v);
      #1;
      checks++;
      if ($countones(v[9:0]) != int'(s) + 2 * int'(c1) + 4 * (int'(c0) + int'(c2))) begin
        failures++;
        $display("FAIL in=%b -> s=%b c0=%b c1=%b c2=%b", v[9:0], s, c0, c1, c2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // Watchdog: ends the run with a failure if the stimulus never finishes.
  initial begin
    #(100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
