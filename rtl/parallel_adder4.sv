// 4-bit parallel adder: s = (a + b) mod 16.
// A ripple of four full adders with carry-in 0. It is the last stage of the
// 15-4 compressor, where the two operands are a count of carries (shifted left
// one place) and a count of sums, so the true sum never exceeds 15 and the
// carry out of bit 3 is always zero; it is therefore not brought out.
// The ripple structure is this design's choice; the reference only asks for a
// 4-bit parallel adder. Purely combinational.
module parallel_adder4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [3:0] s
);
  logic [4:0] c;
  assign c[0] = 1'b0;
  for (genvar i = 0; i < 4; i++) begin : g_bit
    full_adder u_fa (.x(a[i]), .y(b[i]), .z(c[i]), .sum(s[i]), .carry(c[i+1]));
  end
  // c[4] is always 0 for the operand ranges of the 15-4 compressor.
  logic unused_cout;
  assign unused_cout = c[4];
endmodule
