// Column adder: counts the ones among the NIN bits of one product column.
// s = popcount(x), W = count_width(NIN) bits. The smallest counter that holds
// the column is used: a wire (1 bit), a half adder (2), a full adder (3), the
// 5-3 (4..5), 10-4 (6..10), 15-4 (11..15) or 20-5 (16..20) compressor, with
// unused compressor inputs tied to 0. In the multiplier, s[0] is the product
// bit of the column and s[j] is a carry into the column j places higher.
// The choice of compressor by column height is this design's own rule.
// Purely combinational.
module column_adder
  import vedic_pkg::*;
#(
  parameter int NIN = 20,
  localparam int W  = count_width(NIN)
) (
  input  logic [NIN-1:0] x,
  output logic [W-1:0]   s
);
  if (NIN < 1 || NIN > MAX_COL_IN) begin : g_bad
    $error("column_adder: NIN=%0d is outside 1..%0d", NIN, MAX_COL_IN);
  end else if (NIN == 1) begin : g_wire
    assign s = x;
  end else if (NIN == 2) begin : g_ha
    half_adder u_ha (.x(x[0]), .y(x[1]), .sum(s[0]), .carry(s[1]));
  end else if (NIN == 3) begin : g_fa
    full_adder u_fa (.x(x[0]), .y(x[1]), .z(x[2]), .sum(s[0]), .carry(s[1]));
  end else if (NIN <= 5) begin : g_c53
    logic [4:0] xp;
    assign xp = 5'(x);
    comp5_3 u_c (.x(xp), .s(s));
  end else if (NIN <= 10) begin : g_c104
    logic [9:0] xp;
    assign xp = 10'(x);
    comp10_4 u_c (.x(xp), .s(s));
  end else if (NIN <= 15) begin : g_c154
    logic [14:0] xp;
    assign xp = 15'(x);
    comp15_4 u_c (.x(xp), .s(s));
  end else begin : g_c205
    logic [19:0] xp;
    assign xp = 20'(x);
    comp20_5 u_c (.x(xp), .s(s));
  end
endmodule
