// Reference model of the approximate multiplier for the testbenches.
//
// Works on 64-bit words for operand widths up to 32. For each column it
// gathers the partial products in order of rising b index, replaces each
// full group of five (in columns below approx_cols) by the compressor value
// Sum + 2*Carry, with Carry = "two or more ones" and
// Sum = X4 OR ((X0 != X1) AND (X2 != X3)), and adds everything else exactly.
// This is written from the behaviour of the compressor, not from its gates.
package tb_approx_model_pkg;

  typedef logic [63:0] word_t;

  function automatic word_t approx_product(input word_t a, input word_t b,
                                           input int width, input int approx_cols);
    word_t total, mask;
    int nb;
    nb = 2 * width;
    total = '0;
    for (int k = 0; k <= 2 * width - 2; k++) begin
      bit col [$];
      int ngroups;
      for (int i = 0; i < width; i++)
        if (k - i >= 0 && k - i < width) col.push_back(a[k-i] & b[i]);
      ngroups = (k < approx_cols) ? col.size() / 5 : 0;
      for (int t = 0; t < col.size(); t++) begin
        if (t >= 5 * ngroups) total += word_t'(col[t]) << k;
      end
      for (int g = 0; g < ngroups; g++) begin
        int n;
        bit s, c;
        n = 0;
        for (int t = 5 * g; t < 5 * g + 5; t++) n += int'(col[t]);
        c = (n >= 2);
        s = col[5*g+4] || ((col[5*g] != col[5*g+1]) && (col[5*g+2] != col[5*g+3]));
        total += (word_t'(s) << k) + (word_t'(c) << (k + 1));
      end
    end
    mask = (nb >= 64) ? '1 : ((word_t'(1) << nb) - 1);
    return total & mask;
  endfunction

endpackage
