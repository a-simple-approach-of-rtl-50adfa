// svm_pattern - five-segment discontinuous switching pattern.
//
// In every sector one leg does not switch for the whole carrier period:
// odd sectors (I, III, V) hold the leg with the highest phase voltage at 1, so
// the centre state is the null vector V7 (111); even sectors (II, IV, VI) hold
// the leg with the lowest phase voltage at 0, so the centre state is V0 (000).
// The other two legs compare the triangle carrier with level A (T_a) and
// level B (T_a + T_b):
//   odd  sectors: leg is 1 while carrier > level
//   even sectors: leg is 1 while carrier < level
// which gives the state sequence X-Y-Z-Y-X over one carrier period.
//   sector  held    level A   level B
//   I       sa = 1  sb        sc
//   II      sc = 0  sa        sb
//   III     sb = 1  sc        sa
//   IV      sa = 0  sb        sc
//   V       sc = 1  sa        sb
//   VI      sb = 0  sc        sa
// Sector I and the odd/even comparison rule are given by the source design;
// the leg assignment of the other sectors is derived here from which
// line-to-line voltage each entry of the switching-time table equals.
// Purely combinational; all inputs are offset-binary words on one scale.
module svm_pattern
  import svm_pkg::*;
(
  input  sector_e sector,
  input  word_t   tri_in,
  input  word_t   level_a,
  input  word_t   level_b,
  output logic    sa,
  output logic    sb,
  output logic    sc
);

  logic odd, pa, pb;

  always_comb begin
    odd = sector[0];
    pa  = odd ? (tri_in > level_a) : (tri_in < level_a);
    pb  = odd ? (tri_in > level_b) : (tri_in < level_b);
    unique case (sector)
      SEC_I:   begin sa = 1'b1; sb = pa;   sc = pb;   end
      SEC_II:  begin sa = pa;   sb = pb;   sc = 1'b0; end
      SEC_III: begin sa = pb;   sb = 1'b1; sc = pa;   end
      SEC_IV:  begin sa = 1'b0; sb = pa;   sc = pb;   end
      SEC_V:   begin sa = pa;   sb = pb;   sc = 1'b1; end
      SEC_VI:  begin sa = pb;   sb = 1'b0; sc = pa;   end
      default: begin sa = 1'b0; sb = 1'b0; sc = 1'b0; end
    endcase
  end

endmodule
