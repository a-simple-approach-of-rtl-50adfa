// duration_tatb - second comparison level (T_a + T_b) of the SVM generator.
//
// Evaluates the T_a + T_b column of the switching-time table for the given
// sector:
//   I   3/4(va + vb/sqrt3)    II  3/4*2vb/sqrt3        III  3/4(vb/sqrt3 - va)
//   IV -3/4(va + vb/sqrt3)    V  -3/4*2vb/sqrt3        VI   3/4(va - vb/sqrt3)
// where va, vb are the signed table values (offset 224 removed). Each entry
// is the line-to-line voltage between the clamped leg and the leg switched at
// this level, so it is always the larger of the two levels. The table follows
// the source design; V_dc = 256 counts, the fixed-point constants and the
// clamp to 0..128 are this design's choices. The result is the offset-binary
// word 224 + (T_a + T_b). Purely combinational.
module duration_tatb
  import svm_pkg::*;
(
  input  word_t   v_alfa,
  input  word_t   v_beta,
  input  sector_e sector,
  output word_t   level
);

  sval_t va, vb;
  acc_t  acc;

  always_comb begin
    va = to_signed(v_alfa);
    vb = to_signed(v_beta);
    unique case (sector)
      SEC_I:   acc =  term2(va, vb);
      SEC_II:  acc =  term3(vb);
      SEC_III: acc = -term1(va, vb);
      SEC_IV:  acc = -term2(va, vb);
      SEC_V:   acc = -term3(vb);
      SEC_VI:  acc =  term1(va, vb);
      default: acc = '0;
    endcase
    level = level_word(acc);
  end

endmodule
