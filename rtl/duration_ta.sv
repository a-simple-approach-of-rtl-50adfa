// duration_ta - first comparison level (T_a) of the SVM generator.
//
// Evaluates the T_a column of the switching-time table for the given sector:
//   I   3/4(va - vb/sqrt3)    II  3/4(va + vb/sqrt3)   III  3/4*2vb/sqrt3
//   IV  3/4(vb/sqrt3 - va)    V  -3/4(va + vb/sqrt3)   VI  -3/4*2vb/sqrt3
// where va, vb are the signed table values (offset 224 removed). The table
// and its 3T/4 factor follow the source design; taking the carrier height as
// the half period (so a time is a carrier count) is its simplification too,
// while V_dc = 256 counts, the fixed-point constants and the clamp of the
// result to 0..128 are this design's choices. The result is returned as an
// offset-binary word 224 + T_a, directly comparable with the triangle
// carrier. Purely combinational.
module duration_ta
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
      SEC_I:   acc =  term1(va, vb);
      SEC_II:  acc =  term2(va, vb);
      SEC_III: acc =  term3(vb);
      SEC_IV:  acc = -term1(va, vb);
      SEC_V:   acc = -term2(va, vb);
      SEC_VI:  acc = -term3(vb);
      default: acc = '0;
    endcase
    level = level_word(acc);
  end

endmodule
