// svm_pkg - shared types and constants of the five-segment discontinuous
// space-vector modulator.
//
// All analog-like quantities travel as 9-bit unsigned offset-binary words:
// a value x in [-1, 1] is coded as BASE + AMP*x, so the reference vector
// table spans LOWER (96) .. UPPER (352) around BASE (224), and the triangle
// carrier spans BASE .. UPPER. These three numbers follow the source design.
//
// The switching-time levels of each sector are linear in v_alpha and v_beta:
//   T1 = 3/4 (va - vb/sqrt3),  T2 = 3/4 (va + vb/sqrt3),  T3 = 3/4 * 2vb/sqrt3
// (va, vb are the signed table values, V_dc = 2*AMP counts). They are computed
// here as integers over 4096 (FRAC bits) and rounded to the nearest count;
// the fixed-point format is this design's own choice.
package svm_pkg;

  localparam int W     = 9;     // width of every offset-binary word
  localparam int BASE  = 224;   // code of zero
  localparam int AMP   = 128;   // code distance of +/-1
  localparam int LOWER = BASE - AMP;  // 96
  localparam int UPPER = BASE + AMP;  // 352

  localparam int FRAC        = 12;    // fraction bits of the level arithmetic
  localparam int K_3_4       = 3072;  // 3/4       * 4096
  localparam int K_SQ3_4     = 1774;  // sqrt(3)/4 * 4096 (1773.6)
  localparam int K_SQ3_2     = 3548;  // sqrt(3)/2 * 4096 (3547.7)
  localparam int K_SQ3       = 7094;  // sqrt(3)   * 4096 (7094.2)

  typedef logic [W-1:0] word_t;       // offset-binary word
  typedef logic signed [W:0] sval_t;  // signed value, -AMP .. +AMP (and a bit more)
  typedef logic signed [23:0] acc_t;  // level accumulator (|x| < 2^21)

  // Sector number, three bits as on the sector2..sector0 pins.
  typedef enum logic [2:0] {
    SEC_I   = 3'd1,
    SEC_II  = 3'd2,
    SEC_III = 3'd3,
    SEC_IV  = 3'd4,
    SEC_V   = 3'd5,
    SEC_VI  = 3'd6
  } sector_e;

  // Remove the offset from a 9-bit word.
  function automatic sval_t to_signed(input word_t w);
    return sval_t'({1'b0, w}) - sval_t'(BASE);
  endfunction

  // Round an accumulator over 2^FRAC to counts, clamp to 0..AMP and add the
  // offset, giving a word on the same scale as the triangle carrier.
  function automatic word_t level_word(input acc_t acc);
    acc_t r;
    r = (acc + acc_t'(1 << (FRAC - 1))) >>> FRAC;
    if (r < 0)          r = 0;
    else if (r > acc_t'(AMP)) r = acc_t'(AMP);
    return word_t'(r + acc_t'(BASE));
  endfunction

  // The three sector-independent terms (over 2^FRAC).
  function automatic acc_t term1(input sval_t va, input sval_t vb);   // 3/4(va - vb/sqrt3)
    return acc_t'(K_3_4) * acc_t'(va) - acc_t'(K_SQ3_4) * acc_t'(vb);
  endfunction
  function automatic acc_t term2(input sval_t va, input sval_t vb);   // 3/4(va + vb/sqrt3)
    return acc_t'(K_3_4) * acc_t'(va) + acc_t'(K_SQ3_4) * acc_t'(vb);
  endfunction
  function automatic acc_t term3(input sval_t vb);                    // 3/4 * 2vb/sqrt3
    return acc_t'(K_SQ3_2) * acc_t'(vb);
  endfunction

endpackage
