// deadtime_system - dead-time insertion for the three inverter legs.
//
// One deadtime_leg (16-bit counter and 16-bit comparator) per leg turns the
// switching states sa, sb, sc into the six gate signals *_up (upper switch)
// and *_lw (lower switch), with both gates of a leg off for DEADTIME clocks
// around every transition. Port names follow the source design; one common
// dead time for all legs is this design's choice. Timing as deadtime_leg.
module deadtime_system #(
  parameter int unsigned DEADTIME = 67
) (
  input  logic clk,
  input  logic clrn,
  input  logic sa,
  input  logic sb,
  input  logic sc,
  output logic sa_up,
  output logic sa_lw,
  output logic sb_up,
  output logic sb_lw,
  output logic sc_up,
  output logic sc_lw
);

  deadtime_leg #(.DEADTIME(DEADTIME)) u_leg_a (.clk, .clrn, .s(sa), .up(sa_up), .lw(sa_lw));
  deadtime_leg #(.DEADTIME(DEADTIME)) u_leg_b (.clk, .clrn, .s(sb), .up(sb_up), .lw(sb_lw));
  deadtime_leg #(.DEADTIME(DEADTIME)) u_leg_c (.clk, .clrn, .s(sc), .up(sc_up), .lw(sc_lw));

endmodule
