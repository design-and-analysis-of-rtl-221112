// End-to-end test of the top level at its default size (16 x 16).
// Multiplier: corner operands, every a with b = all ones for the lowest 4096
// values of a, and 300000 random pairs, each product compared with the
// arithmetic product. 7-2 compressor: all 1024 input patterns, weighted output
// compared with the number of ones.
// It also counts how often each kind of column counter in the multiplier
// produced its most significant count bit (the case that needs the full
// compressor width: half adder, 5-3, 10-4, 15-4, 20-5). The only full-adder
// column is the top one (31), whose carry is always 0 because the product fits
// in 32 bits; for it the sum bit is counted instead. It also counts how
// often the 7-2 compressor raised each of its carry outputs; a mechanism
// that never happened counts as a failure.
`timescale 1ns/1ps
module tb_vedic_top;
  int checks = 0;
  int failures = 0;

  logic [15:0] a, b;
  logic [31:0] p;
  logic [7:0]  x;
  logic        cin1, cin2, s, c0, c1, c2;

  vedic_top dut (.a(a), .b(b), .p(p),
                 .c72_x(x), .c72_cin1(cin1), .c72_cin2(cin2),
                 .c72_s(s), .c72_c0(c0), .c72_c1(c1), .c72_c2(c2));

  // Representative columns of the 16 x 16 multiplier and the counter each
  // one uses: column 1 (2 bits, half adder), 31 (3 bits, full adder),
  // 3 (5 bits, 5-3), 5 (8 bits, 10-4), 8 (12 bits, 15-4), 15 (19 bits, 20-5).
  localparam int NKIND = 6;
  localparam string KIND [NKIND] = '{"half adder", "full adder", "5-3", "10-4", "15-4", "20-5"};
  int seen [NKIND];
  int seen72 [3];
  logic [NKIND-1:0] msb;
  assign msb = {dut.u_mul.g_col[15].s[4], dut.u_mul.g_col[8].s[3],
                dut.u_mul.g_col[5].s[3],  dut.u_mul.g_col[3].s[2],
                dut.u_mul.g_col[31].s[0], dut.u_mul.g_col[1].s[1]};

  task automatic mul(logic [15:0] x_, logic [15:0] y_);
    a = x_;
    b = y_;
    #1;
    checks++;
    if (p !== 32'(x_) * 32'(y_)) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h -> %h, expected %h", x_, y_, p, 32'(x_) * 32'(y_));
    end
    for (int k = 0; k < NKIND; k++) if (msb[k]) seen[k]++;
  endtask

  localparam logic [15:0] CORNERS [8] = '{16'h0000, 16'h0001, 16'hFFFF, 16'h8000,
                                          16'h5555, 16'hAAAA, 16'h7FFF, 16'hFF00};

  initial begin
    x = '0; cin1 = 1'b0; cin2 = 1'b0;
    foreach (CORNERS[i]) foreach (CORNERS[j]) mul(CORNERS[i], CORNERS[j]);
    for (int v = 0; v < 4096; v++) mul(16'(v), 16'hFFFF);
    for (int r = 0; r < 300000; r++) mul(16'($urandom), 16'($urandom));

    for (int v = 0; v < 1024; v++) begin
      {cin2, cin1, x} = 10'(v);
      #1;
      checks++;
      if ($countones(v[9:0]) != int'(s) + 2 * int'(c1) + 4 * (int'(c0) + int'(c2))) begin
        failures++;
        $display("FAIL 7-2 in=%b -> s=%b c0=%b c1=%b c2=%b", v[9:0], s, c0, c1, c2);
      end
      if (c0) seen72[0]++;
      if (c1) seen72[1]++;
      if (c2) seen72[2]++;
    end

    for (int k = 0; k < NKIND; k++) begin
      $display("%s column: counted bit set %0d times", KIND[k], seen[k]);
      checks++;
      if (seen[k] == 0) failures++;
    end
    for (int k = 0; k < 3; k++) begin
      $display("7-2 carry c%0d set %0d times", k, seen72[k]);
      checks++;
      if (seen72[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog: ends the run with a failure if the stimulus never finishes.
  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
