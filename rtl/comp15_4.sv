// 15-4 compressor: s = number of ones among x[14:0] (0..15), 4 bits.
// Five full adders each take three inputs (FA i takes x[3i+2:3i]). One 5-3
// compressor counts their five sum bits (weight 1), another counts their five
// carry bits (weight 2). A 4-bit parallel adder adds the two counts, the carry
// count shifted one place left: s = {cc, 1'b0} + {1'b0, sc}.
// Structure as in the reference circuit. Purely combinational.
module comp15_4 (
  input  logic [14:0] x,
  output logic [3:0]  s
);
  logic [4:0] fs, fc;
  logic [2:0] sc, cc;
  for (genvar i = 0; i < 5; i++) begin : g_fa
    full_adder u_fa (.x(x[3*i]), .y(x[3*i+1]), .z(x[3*i+2]), .sum(fs[i]), .carry(fc[i]));
  end
  comp5_3 u_sums   (.x(fs), .s(sc));
  comp5_3 u_carrys (.x(fc), .s(cc));
  parallel_adder4 u_add (.a({cc, 1'b0}), .b({1'b0, sc}), .s(s));
endmodule
