// 5-3 compressor: s = number of ones among x[4:0] (0..5), as a 3-bit count.
// Multiplexer form: x[0..2] are combined by a small gate network into
//   p   = x0 ^ x1 ^ x2                 (parity of the three)
//   maj = majority(x0, x1, x2)         (count of the three >= 2)
//   all = x0 & x1 & x2                 (count == 3)
//   neq = not all three equal          (count is 1 or 2)
// and x[3], x[4] act as the selects of three 4:1 multiplexers, one per output
// bit, because adding 0, 1 or 2 to a count of 0..3 only shifts which of these
// terms each output bit equals:
//   x3+x4 = 0: s = {0,   maj,  p}
//   x3+x4 = 1: s = {all, neq, ~p}
//   x3+x4 = 2: s = {maj, ~maj, p}
// Only the parity path uses XOR gates. The multiplexer structure follows the
// reference circuit; the placement of each term at each select code is worked
// out from the count. Purely combinational.
module comp5_3 (
  input  logic [4:0] x,
  output logic [2:0] s
);
  logic p, maj, all1, neq;
  assign p    = x[0] ^ x[1] ^ x[2];
  assign maj  = (x[0] & x[1]) | (x[1] & x[2]) | (x[0] & x[2]);
  assign all1 = x[0] & x[1] & x[2];
  assign neq  = (x[0] & ~x[2]) | (x[2] & ~x[1]) | (x[1] & ~x[0]);

  always_comb begin
    unique case ({x[4], x[3]})
      2'b00:          s = {1'b0, maj,  p};
      2'b01, 2'b10:   s = {all1, neq, ~p};
      default:        s = {maj,  ~maj, p};
    endcase
  end
endmodule
