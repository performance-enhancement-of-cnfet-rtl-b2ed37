// approx_mul_pkg: sizes and partial-product map of the approximate 8x8
// Dadda multiplier.
//
// Partial product (column k, row r) is a[k-r] & b[r]; it has weight 2**k.
// Only the 25 listed below are generated. The four lowest columns are
// truncated, the accurate columns 11..14 keep all their partial products,
// and in the approximate columns 4..10 only the bits that feed an
// approximate compressor (its x1, x3, x4 inputs) or pass straight to the
// final adder are formed. pp_idx() turns a (column, row) pair into an index
// of that list at elaboration time.
package approx_mul_pkg;

  localparam int unsigned WIDTH      = 8;                  // operand width
  localparam int unsigned TRUNC_COLS = 4;                  // dropped LSB columns
  localparam int unsigned OUT_W      = 2*WIDTH - TRUNC_COLS; // product bits kept
  localparam int unsigned NUM_PP     = 25;                 // generated partial products

  // Column and row of each generated partial product.
  localparam int PP_COL [NUM_PP] = '{
    4, 4, 4,                // approximate compressor of stage 2
    5,                      // passes to the final adder
    6,                      // passes to the final adder
    7, 7, 7,                // approximate compressor, column 7
    8, 8, 8,                // approximate compressor, column 8
    10, 10, 10,             // approximate compressor, column 10
    10,                     // passes to the final adder
    11, 11, 11, 11,         // accurate section
    12, 12, 12,
    13, 13,
    14
  };
  localparam int PP_ROW [NUM_PP] = '{
    2, 3, 4,
    4,
    6,
    0, 2, 3,
    1, 3, 4,
    3, 5, 6,
    7,
    4, 5, 6, 7,
    5, 6, 7,
    6, 7,
    7
  };

  // Index of partial product (col, row) in the lists above, or -1.
  function automatic int pp_idx(input int col, input int row);
    int idx;
    idx = -1;
    for (int n = 0; n < NUM_PP; n++)
      if (PP_COL[n] == col && PP_ROW[n] == row) idx = n;
    return idx;
  endfunction

endpackage
