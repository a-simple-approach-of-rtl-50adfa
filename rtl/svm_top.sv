// svm_top - five-segment discontinuous space-vector PWM modulator.
//
// From a single 33.33 MHz clock the modulator drives the six gates of a
// three-phase two-level inverter with a 50 Hz reference at a 20 kHz carrier:
//   ajust_freq      divides the clock into the table strobe (cksin, 18 kHz)
//                   and the carrier strobe (cktri, 640 kHz)
//   vbeta_valfa     360-entry sine/cosine tables: V_beta, V_alpha
//   find_sector     sector I..VI from three sign tests, also brought out on
//                   sector2..sector0
//   svm_generator   triangle carrier, T_a and T_a+T_b levels, switching
//                   pattern -> leg states sa, sb, sc
//   deadtime_system 2 us dead time per leg -> sa_up .. sc_lw
// The partition and the port names follow the source design. TRI_DIV sets
// the carrier (52: 20.03 kHz, 26: 40.06 kHz), SIN_DIV the fundamental
// (1852: 49.99 Hz), DEADTIME the dead time in clocks. Reset clrn is
// asynchronous and active low. Lint reports clrn as used both synchronously
// and asynchronously only because the assertions in the sub-blocks use it in
// their disable condition; every flip-flop resets asynchronously.
module svm_top
  import svm_pkg::*;
#(
  parameter int unsigned TRI_DIV  = 52,
  parameter int unsigned SIN_DIV  = 1852,
  parameter int unsigned DEADTIME = 67
) (
  input  logic clk,
  input  logic clrn,
  output logic sector2,
  output logic sector1,
  output logic sector0,
  output logic sa_up,
  output logic sa_lw,
  output logic sb_up,
  output logic sb_lw,
  output logic sc_up,
  output logic sc_lw
);

  logic    cksin, cktri;
  word_t   vbeta_sin, valfa_cos;
  sector_e sector;
  logic    sa, sb, sc;

  ajust_freq #(.TRI_DIV(TRI_DIV), .SIN_DIV(SIN_DIV)) u_ajust_freq (
    .clk, .clrn, .cksin, .cktri
  );

  vbeta_valfa u_vbeta_valfa (
    .clk, .clrn, .cksin, .vbeta_sin, .valfa_cos
  );

  find_sector u_find_sector (
    .v_beta(vbeta_sin), .v_alfa(valfa_cos), .sector
  );

  svm_generator u_svm_generator (
    .clk, .clrn, .cktri, .sector, .v_alfa(valfa_cos), .v_beta(vbeta_sin),
    .sa, .sb, .sc
  );

  deadtime_system #(.DEADTIME(DEADTIME)) u_deadtime_system (
    .clk, .clrn, .sa, .sb, .sc,
    .sa_up, .sa_lw, .sb_up, .sb_lw, .sc_up, .sc_lw
  );

  assign {sector2, sector1, sector0} = sector;

endmodule
