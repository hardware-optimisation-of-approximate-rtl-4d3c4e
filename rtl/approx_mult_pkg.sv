// Shared constants and elaboration-time helpers of the approximate multiplier.
//
// The partial products of a WIDTH x WIDTH multiplier form 2*WIDTH-1 columns.
// Bit t of column k is the partial product a[k-i] AND b[i] with
// i = col_first_row(k) + t, i.e. the bits of a column are numbered by rising
// b index. In the columns chosen for approximation, the bits are taken in
// groups of five (t = 0..4, 5..9, ...) by approximate 5:2 compressors; bits
// left over after the last full group are added exactly. The functions
// below give these counts at elaboration time. Nothing here is clocked.
package approx_mult_pkg;

  // Operand width of the multiplier as published: 8-bit a and b, 16-bit product.
  localparam int unsigned DEFAULT_WIDTH = 8;

  // Inputs of one 5:2 compressor.
  localparam int unsigned COMP_INPUTS = 5;

  // Row (b index) of the first partial product in column k.
  function automatic int unsigned col_first_row(int unsigned k, int unsigned width);
    return (k >= width) ? k - width + 1 : 0;
  endfunction

  // Number of partial products in column k.
  function automatic int unsigned col_height(int unsigned k, int unsigned width);
    int unsigned last;
    if (k > 2 * width - 2) return 0;
    last = (k < width) ? k : width - 1;
    return last - col_first_row(k, width) + 1;
  endfunction

  // Compressors in column k: full groups of five, only below approx_cols.
  function automatic int unsigned col_groups(int unsigned k, int unsigned width,
                                             int unsigned approx_cols);
    return (k < approx_cols) ? col_height(k, width) / COMP_INPUTS : 0;
  endfunction

  // Most compressors any column can hold.
  function automatic int unsigned max_groups(int unsigned width);
    return width / COMP_INPUTS;
  endfunction

  // Whether partial product a[j] AND b[i] goes into a compressor.
  function automatic bit pp_compressed(int unsigned i, int unsigned j,
                                       int unsigned width, int unsigned approx_cols);
    int unsigned k;
    k = i + j;
    return (i - col_first_row(k, width)) < COMP_INPUTS * col_groups(k, width, approx_cols);
  endfunction

endpackage
