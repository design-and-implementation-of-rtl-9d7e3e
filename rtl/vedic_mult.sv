// Urdhva Tiryakbhyam ("vertically and crosswise") multiplier, N x N bits,
// built on 7:2 compressors. It is the circuit under test of the BIST.
//
// Vertically and crosswise: product bit column k collects every partial
// product a[i] & b[j] with i + j = k, the vertical (i = j) and crosswise
// pairs of the method. All 2N-1 columns are formed at once. Each column's
// bits (at most N <= 8 of them) go into one 7:2 compressor, which returns the
// column count as four bits of weight 2^k, 2^(k+1), 2^(k+2), 2^(k+3).
// Gathering these by weight gives four rows; one carry-propagate adder adds
// them into the 2N-bit product.
//
// Following the design: the column-wise vertical/crosswise partial products,
// the 7:2 compressor as column adder, the 8 x 8 size. This design's own
// choices: the carry-ins of the compressors are tied low (every column is
// counted in parallel instead of rippling carries column to column), and the
// four weighted rows are added with one adder. Purely combinational: p is
// valid in the same cycle as a and b.
module vedic_mult #(
  parameter int unsigned N = 8   // operand width; one 7:2 compressor per column needs N <= 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  localparam int unsigned COLS = 2 * N - 1;

  // Column partial products, padded to the compressor's eight inputs.
  logic [7:0]      col_pp [COLS];
  logic [COLS-1:0] cs, cc0, cc1, cc2;

  always_comb begin
    for (int k = 0; k < COLS; k++) begin
      col_pp[k] = '0;
      for (int i = 0; i < N; i++) begin
        if (k - i >= 0 && k - i < N)
          col_pp[k][i] = a[i] & b[k-i];
      end
    end
  end

  for (genvar k = 0; k < COLS; k++) begin : g_col
    compressor_7_2 u_cmp (
      .x   (col_pp[k]),
      .cin1(1'b0),
      .cin2(1'b0),
      .s   (cs[k]),
      .c0  (cc0[k]),
      .c1  (cc1[k]),
      .c2  (cc2[k])
    );
  end

  // Four rows, each bit at its weight. Bits shifted beyond 2N are always
  // zero (the high columns hold few partial products) and the sum is taken
  // modulo 2^2N, which loses nothing because the product fits in 2N bits.
  logic [2*N-1:0] row_s, row_c0, row_c1, row_c2;

  always_comb begin
    row_s  = (2*N)'(cs);
    row_c0 = (2*N)'(cc0) << 1;
    row_c1 = (2*N)'(cc1) << 2;
    row_c2 = (2*N)'(cc2) << 3;
    p      = row_s + row_c0 + row_c1 + row_c2;
  end

  initial begin
    assert (N >= 1 && N <= 8)
      else $fatal(1, "vedic_mult: N must be 1..8 (one 7:2 compressor per column)");
  end
endmodule
