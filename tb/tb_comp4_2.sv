// Exhaustive test of the 4-2 compressor: for all 32 input patterns checks
// x1+x2+x3+x4+cin == sum + 2*(carry+cout), that sum is the parity, and that
// cout does not change with cin (no ripple between columns).
`timescale 1ns/1ps
module tb_comp4_2;
  int checks = 0;
  int failures = 0;

  logic x1, x2, x3, x4, cin, sum, carry, cout;
  logic cout_prev;
  comp4_2 dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .cin(cin),
               .sum(sum), .carry(carry), .cout(cout));
  initial begin
    for (int v = 0; v < 16; v++) begin
      for (int c = 0; c < 2; c++) begin
        {x4, x3, x2, x1} = 4'(v);
        cin = 1'(c);
        #1;
        checks++;
        if (int'(x1) + int'(x2) + int'(x3) + int'(x4) + int'(cin)
            != int'(sum) + 2 * (int'(carry) + int'(cout))) begin
          failures++;
          $display("FAIL count x=%b cin=%b -> sum=%b carry=%b cout=%b", {x4,x3,x2,x1}, cin, sum, carry, cout);
        end
        checks++;
        if (sum !== (x1 ^ x2 ^ x3 ^ x4 ^ cin)) begin
          failures++;
          $display("FAIL parity x=%b cin=%b", {x4,x3,x2,x1}, cin);
        end
        if (c == 1) begin
          checks++;
          if (cout !== cout_prev) begin
            failures++;
            $display("FAIL cout depends on cin for x=%b", {x4,x3,x2,x1});
          end
        end
        cout_prev = cout;
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
