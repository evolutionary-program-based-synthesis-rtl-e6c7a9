// systolic_pkg: widths and helper functions shared by the systolic arrays.
//
// The arrays work on signed two's complement integers. The word length is
// this design's own choice (16 bits); every accumulator is made wide enough
// that no sum of products can overflow, 2*DATA_W bits for one product plus
// clog2 of the number of products added.
package systolic_pkg;

  // Default word length of samples, coefficients and matrix elements.
  parameter int unsigned DEFAULT_DATA_W = 16;

  // Width needed to add `terms` signed products of two data_w-bit words.
  function automatic int unsigned acc_width(int unsigned data_w, int unsigned terms);
    return 2 * data_w + ((terms > 1) ? $clog2(terms) : 0);
  endfunction

  // Selects the operation of the convolution/correlation unit.
  typedef enum logic {
    OP_CONV = 1'b0,  // y(n) = sum_k h(k) x(n-k)
    OP_CORR = 1'b1   // r(l) = sum_m h(m) x(m+l)
  } seq_op_e;

endpackage
