// 7-2 compressor: adds ten bits, x[7:0], cin1 and cin2, with two 4-2
// compressors, one half adder and two full adders.
//   4-2 A: x[3:0] + cin1 -> sa (w1), ca, oa (w2)
//   4-2 B: x[7:4] + cin2 -> sb (w1), cb, ob (w2)
//   HA (sa, sb)          -> s (w1), h (w2)
//   FA1(ca, oa, h)       -> f (w2), c0 (w4)
//   FA2(cb, ob, f)       -> c1 (w2), c2 (w4)
// so that  sum of all inputs = s + 2*c1 + 4*(c0 + c2)  exactly (max 10).
// The adder count and the order HA -> FA1 -> FA2 follow the reference
// block diagram. Which 4-2 output feeds which adder, the split of the inputs
// between the two 4-2 compressors and the weights of c0..c2 are this design's
// choices, made so that the block counts exactly. Purely combinational.
module comp7_2 (
  input  logic [7:0] x,
  input  logic       cin1,
  input  logic       cin2,
  output logic       s,
  output logic       c0,
  output logic       c1,
  output logic       c2
);
  logic sa, ca, oa, sb, cb, ob, h, f;
  comp4_2 u_a (.x1(x[0]), .x2(x[1]), .x3(x[2]), .x4(x[3]), .cin(cin1),
               .sum(sa), .carry(ca), .cout(oa));
  comp4_2 u_b (.x1(x[4]), .x2(x[5]), .x3(x[6]), .x4(x[7]), .cin(cin2),
               .sum(sb), .carry(cb), .cout(ob));
  half_adder u_ha  (.x(sa), .y(sb), .sum(s), .carry(h));
  full_adder u_fa1 (.x(ca), .y(oa), .z(h), .sum(f),  .carry(c0));
  full_adder u_fa2 (.x(cb), .y(ob), .z(f), .sum(c1), .carry(c2));
endmodule
