// 10-4 compressor: s = number of ones among x[9:0] (0..10), 4 bits (O1..O4).
// Two 5-3 compressors count x[4:0] and x[9:5]; a half adder and two full
// adders then add the two 3-bit counts as a ripple:
//   HA(lo[0], hi[0])      -> s[0] (O1)
//   FA(lo[1], hi[1], c1)  -> s[1] (O2)
//   FA(lo[2], hi[2], c2)  -> s[2] (O3), s[3] (O4)
// Structure as in the reference circuit. Purely combinational.
module comp10_4 (
  input  logic [9:0] x,
  output logic [3:0] s
);
  logic [2:0] lo, hi;
  logic c1, c2;
  comp5_3    u_lo (.x(x[4:0]), .s(lo));
  comp5_3    u_hi (.x(x[9:5]), .s(hi));
  half_adder u_ha (.x(lo[0]), .y(hi[0]), .sum(s[0]), .carry(c1));
  full_adder u_f1 (.x(lo[1]), .y(hi[1]), .z(c1), .sum(s[1]), .carry(c2));
  full_adder u_f2 (.x(lo[2]), .y(hi[2]), .z(c2), .sum(s[2]), .carry(s[3]));
endmodule
