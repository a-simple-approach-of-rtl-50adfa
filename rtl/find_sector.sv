// find_sector - sector finder of the reference voltage vector.
//
// Instead of computing the vector angle, three sign tests locate it:
//   c0 = V_beta > 0,  c1 = V_beta > sqrt(3) V_alpha,  c2 = V_beta > -sqrt(3) V_alpha
// and the truth table of the source design maps them to the sector:
//   c0 c1 c2 : 101 -> I, 111 -> II, 110 -> III, 010 -> IV, 000 -> V, 001 -> VI.
// The two remaining codes cannot occur for real inputs and give sector I.
// The inputs are the 9-bit offset-binary words of the vector table; sqrt(3)
// is the fixed-point constant 7094/4096 (both choices of this design, as is
// the binary sector number 1..6 on the three output bits). Purely
// combinational.
module find_sector
  import svm_pkg::*;
(
  input  word_t   v_beta,
  input  word_t   v_alfa,
  output sector_e sector
);

  sval_t va, vb;
  acc_t  vb_s, va_s;
  logic  c0, c1, c2;

  always_comb begin
    va   = to_signed(v_alfa);
    vb   = to_signed(v_beta);
    vb_s = acc_t'(vb) <<< FRAC;             // V_beta * 4096
    va_s = acc_t'(K_SQ3) * acc_t'(va);      // sqrt(3) V_alpha * 4096
    c0   = vb > 0;
    c1   = vb_s > va_s;
    c2   = vb_s > -va_s;
    unique case ({c0, c1, c2})
      3'b101:  sector = SEC_I;
      3'b111:  sector = SEC_II;
      3'b110:  sector = SEC_III;
      3'b010:  sector = SEC_IV;
      3'b000:  sector = SEC_V;
      3'b001:  sector = SEC_VI;
      default: sector = SEC_I;
    endcase
  end

endmodule
