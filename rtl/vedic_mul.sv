// Compressor-based Vedic multiplier: p = a * b, unsigned, N x N -> 2N bits.
//
// Vertical-and-crosswise (Urdhva-tiryagbhyam) rule: product column k collects
// every partial product a[i] & b[k-i]. Instead of adding rows of partial
// products, each product bit is computed on its own: one column adder per
// column counts the ones among its partial products and the carries that
// lower columns send to it. Bit 0 of that count is product bit p[k]; bit j is
// a carry into column k + j. Columns of up to 20 bits are counted with the
// 5-3, 10-4, 15-4 and 20-5 compressors; for N = 16 the tallest column (15
// and 16) holds 19 bits and uses a 20-5 compressor.
//
// The per-column compressor choice and the carry routing are this design's
// reconstruction of the column grouping; the compressors themselves follow
// the reference circuits. Carries that would go above column 2N-1 are always
// zero (the product fits in 2N bits) and are left unconnected.
// Purely combinational: no clock, no registers.
module vedic_mul
  import vedic_pkg::*;
#(
  parameter int N = 16
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  if (N < 2 || N > MAX_N || !columns_fit(N)) begin : g_bad
    $error("vedic_mul: N=%0d is outside 2..%0d", N, MAX_N);
  end

  for (genvar k = 0; k < 2*N; k++) begin : g_col
    localparam int NIN = col_inputs(N, k);
    localparam int W   = count_width(NIN);
    localparam int PP  = pp_count(N, k);
    localparam int LO  = pp_low(N, k);
    logic [NIN-1:0] x;
    logic [W-1:0]   s;

    // Partial products of this column.
    for (genvar i = 0; i < PP; i++) begin : g_pp
      assign x[i] = a[LO+i] & b[k-LO-i];
    end
    column_adder #(.NIN(NIN)) u_col (.x(x), .s(s));
    assign p[k] = s[0];

    // Count bits that would carry past the top column are always zero.
    if (k + W - 1 > 2*N - 1) begin : g_top
      logic unused_hi;
      assign unused_hi = |s[W-1:2*N-k];
    end
  end

  // Carries: bit j of column k-j enters column k.
  for (genvar k = 1; k < 2*N; k++) begin : g_route
    for (genvar j = 1; j < MAX_COL_W; j++) begin : g_j
      if (has_carry(N, k, j)) begin : g_c
        assign g_col[k].x[carry_slot(N, k, j)] = g_col[k-j].s[j];
      end
    end
  end
endmodule
