// Test of the compressor-based Vedic multiplier against the arithmetic
// product. N = 4 and N = 8 are tested exhaustively (all operand pairs); the
// default N = 16 with corner operands (0, 1, all ones, single bits, alternating
// bits) and 200000 random pairs.
`timescale 1ns/1ps
module tb_vedic_mul;
  int checks = 0;
  int failures = 0;

  logic [3:0]  a4, b4;
  logic [7:0]  p4;
  logic [7:0]  a8, b8;
  logic [15:0] p8;
  logic [15:0] a16, b16;
  logic [31:0] p16;

  vedic_mul #(.N(4)) dut4  (.a(a4),  .b(b4),  .p(p4));
  vedic_mul #(.N(8)) dut8  (.a(a8),  .b(b8),  .p(p8));
  vedic_mul          dut16 (.a(a16), .b(b16), .p(p16));

  task automatic check16(logic [15:0] x, logic [15:0] y);
    a16 = x;
    b16 = y;
    #1;
    checks++;
    if (p16 !== 32'(x) * 32'(y)) begin
      failures++;
      if (failures < 10) $display("FAIL 16: %h * %h -> %h, expected %h", x, y, p16, 32'(x) * 32'(y));
    end
  endtask

  localparam logic [15:0] CORNERS [8] = '{16'h0000, 16'h0001, 16'hFFFF, 16'h8000,
                                          16'h5555, 16'hAAAA, 16'h7FFF, 16'h00FF};

  initial begin
    for (int v = 0; v < 256; v++) begin
      {a4, b4} = 8'(v);
      #1;
      checks++;
      if (p4 !== 8'(a4) * 8'(b4)) begin
        failures++;
        if (failures < 10) $display("FAIL 4: %0d * %0d -> %0d", a4, b4, p4);
      end
    end
    for (int v = 0; v < 65536; v++) begin
      {a8, b8} = 16'(v);
      #1;
      checks++;
      if (p8 !== 16'(a8) * 16'(b8)) begin
        failures++;
        if (failures < 10) $display("FAIL 8: %0d * %0d -> %0d", a8, b8, p8);
      end
    end
    foreach (CORNERS[i]) foreach (CORNERS[j]) check16(CORNERS[i], CORNERS[j]);
    for (int i = 0; i < 16; i++) check16(16'(1) << i, 16'hFFFF);
    for (int r = 0; r < 200000; r++) check16(16'($urandom), 16'($urandom));
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
