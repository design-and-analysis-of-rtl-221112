// Test of the column adder at every height the multiplier uses a different
// counter for (1, 2, 3, 4, 5, 7, 10, 12, 15, 16, 19, 20 bits). Small heights
// are tested exhaustively, large ones with all-zero, all-one and 20000 random
// patterns; the output must equal the number of ones in x.
`timescale 1ns/1ps
module tb_column_adder;
  int checks = 0;
  int failures = 0;

  localparam int NS [12] = '{1, 2, 3, 4, 5, 7, 10, 12, 15, 16, 19, 20};
  logic [19:0] x;
  logic [4:0]  s [12];

  for (genvar g = 0; g < 12; g++) begin : g_dut
    localparam int NIN = NS[g];
    localparam int W   = vedic_pkg::count_width(NIN);
    logic [W-1:0] so;
    column_adder #(.NIN(NIN)) dut (.x(x[NIN-1:0]), .s(so));
    assign s[g] = 5'(so);
  end

  task automatic check_all();
    #1;
    for (int g = 0; g < 12; g++) begin
      int expect_cnt;
      expect_cnt = 0;
      for (int i = 0; i < NS[g]; i++) expect_cnt += int'(x[i]);
      checks++;
      if (int'(s[g]) != expect_cnt) begin
        failures++;
        if (failures < 10) $display("FAIL NIN=%0d x=%b -> %0d, expected %0d", NS[g], x, s[g], expect_cnt);
      end
    end
  endtask

  initial begin
    for (int v = 0; v < (1 << 12); v++) begin
      x = 20'(v);
      check_all();
    end
    x = '0;
    check_all();
    x = '1;
    check_all();
    for (int r = 0; r < 20000; r++) begin
      x = 20'($urandom);
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog: ends the run with a failure if the stimulus never finishes.
  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
