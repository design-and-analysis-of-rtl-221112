// 20-5 compressor: s = number of ones among x[19:0] (0..20), 5 bits (O1..O5).
// A 15-4 compressor counts x[19:5] (4 bits, hi) and a 5-3 compressor counts
// x[4:0] (3 bits, lo). A ripple of HA, FA, FA, HA adds the two counts:
//   HA(hi[0], lo[0])      -> s[0]
//   FA(hi[1], lo[1], c1)  -> s[1]
//   FA(hi[2], lo[2], c2)  -> s[2]
//   HA(hi[3], c3)         -> s[3], s[4]
// Structure as in the reference circuit. Purely combinational.
module comp20_5 (
  input  logic [19:0] x,
  output logic [4:0]  s
);
  logic [3:0] hi;
  logic [2:0] lo;
  logic c1, c2, c3;
  comp15_4   u_hi  (.x(x[19:5]), .s(hi));
  comp5_3    u_lo  (.x(x[4:0]),  .s(lo));
  half_adder u_h0  (.x(hi[0]), .y(lo[0]), .sum(s[0]), .carry(c1));
  full_adder u_f1  (.x(hi[1]), .y(lo[1]), .z(c1), .sum(s[1]), .carry(c2));
  full_adder u_f2  (.x(hi[2]), .y(lo[2]), .z(c2), .sum(s[2]), .carry(c3));
  half_adder u_h3  (.x(hi[3]), .y(c3), .sum(s[3]), .carry(s[4]));
endmodule
