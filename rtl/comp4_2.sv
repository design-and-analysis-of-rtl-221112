// 4-2 compressor: x1 + x2 + x3 + x4 + cin = sum + 2*(carry + cout).
// Multiplexer-based form with a critical path of three XORs:
//   t1 = x4 ^ x3, t2 = x2 ^ x1, t = t1 ^ t2
//   sum   = t ^ cin
//   carry = t  ? cin : x4      (multiplexer selected by t)
//   cout  = t2 ? x3  : x1      (multiplexer selected by t2)
// cout does not depend on cin, so a row of these compressors can pass cout to
// the cin of the next column without a ripple. Purely combinational.
// The structure and port names follow the reference circuit.
module comp4_2 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic t1, t2, t;
  assign t1    = x4 ^ x3;
  assign t2    = x2 ^ x1;
  assign t     = t1 ^ t2;
  assign sum   = t ^ cin;
  assign carry = t  ? cin : x4;
  assign cout  = t2 ? x3  : x1;
endmodule
