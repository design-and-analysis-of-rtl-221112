// Top level of the compressor-adder design set.
//
// It holds the N x N compressor-based Vedic multiplier (p = a * b, unsigned,
// purely combinational) and, beside it with its own ports, the 7-2 compressor
// built from two 4-2 compressors. The 7-2 and 4-2 compressors belong to the
// same compressor family but the multiplier does not use them; they share
// no signal with it. Everything is combinational.
module vedic_top #(
  parameter int N = 16
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p,
  input  logic [7:0]     c72_x,
  input  logic           c72_cin1,
  input  logic           c72_cin2,
  output logic           c72_s,
  output logic           c72_c0,
  output logic           c72_c1,
  output logic           c72_c2
);
  vedic_mul #(.N(N)) u_mul (.a(a), .b(b), .p(p));

  comp7_2 u_c72 (.x(c72_x), .cin1(c72_cin1), .cin2(c72_cin2),
                 .s(c72_s), .c0(c72_c0), .c1(c72_c1), .c2(c72_c2));
endmodule
