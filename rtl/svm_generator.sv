// svm_generator - SVM switching-state generator.
//
// Holds the four parts of the generator: the triangle carrier, the two
// duration units (level A = T_a, level B = T_a + T_b) and the pattern unit.
// The durations are evaluated continuously from the incoming V_alpha, V_beta
// and sector; with the strobe that returns the carrier to its minimum (the
// first sample of a period) the sector and both levels are latched, so all 32
// samples of a carrier period use one set of levels and its pattern is
// symmetrical about the carrier peak. The latching
// point is this design's choice; the partition follows the source design.
// Timing: on each cktri strobe the carrier advances one sample; the switching
// states sa, sb, sc are registered and follow the new carrier sample one
// clock later, on the edge after the one that samples the strobe. Reset is asynchronous,
// active low: sector I, levels at the carrier minimum, all states 0.
module svm_generator
  import svm_pkg::*;
#(
  parameter int unsigned SAMPLES = 32
) (
  input  logic    clk,
  input  logic    clrn,
  input  logic    cktri,
  input  sector_e sector,
  input  word_t   v_alfa,
  input  word_t   v_beta,
  output logic    sa,
  output logic    sb,
  output logic    sc
);

  word_t   tri_w, lev_a, lev_b, lat_a, lat_b;
  sector_e lat_sec;
  logic    period_end;
  logic    pa, pb, pc;
  logic    step_d;     // cktri delayed by one clock: carrier has just moved

  triangle #(.SAMPLES(SAMPLES)) u_triangle (
    .clk, .clrn, .cktri, .tri_out(tri_w), .period_end
  );

  duration_ta   u_duration_ta   (.v_alfa, .v_beta, .sector, .level(lev_a));
  duration_tatb u_duration_tatb (.v_alfa, .v_beta, .sector, .level(lev_b));

  svm_pattern u_svm_pattern (
    .sector(lat_sec), .tri_in(tri_w), .level_a(lat_a), .level_b(lat_b),
    .sa(pa), .sb(pb), .sc(pc)
  );

  always_ff @(posedge clk or negedge clrn) begin
    if (!clrn) begin
      lat_sec <= SEC_I;
      lat_a   <= word_t'(BASE);
      lat_b   <= word_t'(BASE);
      step_d  <= 1'b0;
      sa      <= 1'b0;
      sb      <= 1'b0;
      sc      <= 1'b0;
    end else begin
      step_d <= cktri;
      if (cktri && period_end) begin
        lat_sec <= sector;
        lat_a   <= lev_a;
        lat_b   <= lev_b;
      end
      if (step_d) begin
        sa <= pa;
        sb <= pb;
        sc <= pc;
      end
    end
  end

  // The second level is never below the first (both are line-to-line
  // voltages measured from the clamped leg, B the larger).
  a_levels_ordered: assert property (@(posedge clk) disable iff (!clrn)
    lat_b >= lat_a);

endmodule
