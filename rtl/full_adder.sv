// Full adder: adds three bits.
// sum = x ^ y ^ z (weight 1), carry = majority(x, y, z) (weight 2).
// Purely combinational. It is the 3-input counter from which the larger
// compressors are assembled; the gate equations are the standard ones.
module full_adder (
  input  logic x,
  input  logic y,
  input  logic z,
  output logic sum,
  output logic carry
);
  logic xy;
  assign xy    = x ^ y;
  assign sum   = xy ^ z;
  assign carry = (x & y) | (xy & z);
endmodule
