// Half adder: adds two bits.
// sum = x ^ y (weight 1), carry = x & y (weight 2). Purely combinational.
// Used inside the 5-3, 10-4, 20-5 and 7-2 compressors and for two-bit product
// columns of the multiplier. Port names follow the adder cells of the reference
// schematics; the gate equations are the standard ones.
module half_adder (
  input  logic x,
  input  logic y,
  output logic sum,
  output logic carry
);
  assign sum   = x ^ y;
  assign carry = x & y;
endmodule
