// toeplitz_pkg: number format, bus types and arithmetic shared by the
// systolic Toeplitz solver.
//
// Every value moving through the array (matrix elements, right-hand side,
// multipliers, solution) is a signed two's-complement fixed-point number of
// DATA_W bits with FRAC_W fraction bits (Q15.16 by default). The algorithm
// itself is written for floating point; fixed point is this design's choice,
// made so that each processor is plain synthesizable integer logic. All
// arithmetic helpers saturate to the representable range instead of wrapping,
// and a division by zero saturates towards the sign of the dividend.
//
// Bus types follow the processor's named lines:
//   lbus_t  - the three lines that run leftwards, outL1..outL3 of S_k feeding
//             inR1..inR3 of S_(k-1)
//   rbus_t  - the two lines that run rightwards, outR1..outR2 of S_k feeding
//             inL1..inL2 of S_(k+1)
//   load_word_t - one initialisation word {t_k, t_-k, b_(n-k)} per processor
//   bus2_t, sym_load_word_t - the same for the symmetric-matrix array, which
//             has two lines each way and needs only {t_k, b_(n-k)}
package toeplitz_pkg;

  localparam int unsigned DATA_W = 32;
  localparam int unsigned FRAC_W = 16;

  typedef logic signed [DATA_W-1:0] data_t;

  // Double-width intermediate for products and shifted dividends.
  typedef logic signed [2*DATA_W-1:0] wide_t;

  localparam data_t DATA_MAX = {1'b0, {(DATA_W-1){1'b1}}};
  localparam data_t DATA_MIN = {1'b1, {(DATA_W-1){1'b0}}};

  typedef struct packed {
    data_t w1;
    data_t w2;
    data_t w3;
  } lbus_t;

  typedef struct packed {
    data_t w1;
    data_t w2;
  } rbus_t;

  // Symmetric-matrix array: two lines in each direction, and one load word
  // {t_k, b_(n-k)} per processor.
  typedef struct packed {
    data_t w1;
    data_t w2;
  } bus2_t;

  typedef struct packed {
    data_t t;
    data_t b;
  } sym_load_word_t;

  typedef struct packed {
    data_t t_pos;  // t_k   : element k of the first row of T
    data_t t_neg;  // t_-k  : element k of the first column of T
    data_t b;      // b_(n-k)
  } load_word_t;

  // Regeneration array: the multiplier pair (m_k, m_-k) of one iteration.
  typedef struct packed {
    data_t m_pos;  // m_k  : used in the first step of the iteration
    data_t m_neg;  // m_-k : used in the second step
  } mult_pair_t;

  // Clamp a double-width value into data_t.
  function automatic data_t sat(input wide_t v);
    return (v > wide_t'(DATA_MAX)) ? DATA_MAX :
           (v < wide_t'(DATA_MIN)) ? DATA_MIN : data_t'(v);
  endfunction

  function automatic data_t fx_add(input data_t a, input data_t b);
    return sat(wide_t'(a) + wide_t'(b));
  endfunction

  function automatic data_t fx_sub(input data_t a, input data_t b);
    return sat(wide_t'(a) - wide_t'(b));
  endfunction

  // a*b, truncated towards minus infinity to FRAC_W fraction bits.
  function automatic data_t fx_mul(input data_t a, input data_t b);
    wide_t p;
    p = wide_t'(a) * wide_t'(b);
    return sat(p >>> FRAC_W);
  endfunction

  // a/b, quotient truncated towards zero.
  function automatic data_t fx_div(input data_t a, input data_t b);
    wide_t num;
    num = wide_t'(a) <<< FRAC_W;
    return (b == '0) ? ((a < 0) ? DATA_MIN : DATA_MAX) : sat(num / wide_t'(b));
  endfunction

endpackage
