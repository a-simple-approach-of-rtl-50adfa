// deadtime_leg - dead-time generator of one inverter leg.
//
// A CW-bit (16) counter counts the clocks since the leg command s last
// changed and saturates at its maximum; a CW-bit comparator releases the
// gates once the count has reached DEADTIME:
//   up = s  && count >= DEADTIME
//   lw = !s && count >= DEADTIME
// After every edge of s both gates are therefore off for DEADTIME clocks
// (67 clocks = 2.01 us at 33.33 MHz) before the complementary switch turns
// on; a command pulse shorter than that is suppressed for the switch it
// would turn on. The counter/comparator structure and the 2 us minimum follow
// the source design; the turn-on-delay scheme, active-high gates and the
// reset state (both off, counter at 0) are this design's choices.
// Timing: s is registered once, so a gate turns on DEADTIME+1 clocks after
// the edge of s and turns off one clock after it.
module deadtime_leg #(
  parameter int unsigned CW       = 16,
  parameter int unsigned DEADTIME = 67
) (
  input  logic clk,
  input  logic clrn,
  input  logic s,
  output logic up,
  output logic lw
);

  logic          s_q;
  logic [CW-1:0] cnt;
  logic          done;

  always_ff @(posedge clk or negedge clrn) begin
    if (!clrn) begin
      s_q <= 1'b0;
      cnt <= '0;
    end else begin
      s_q <= s;
      if (s != s_q)     cnt <= '0;
      else if (!(&cnt)) cnt <= cnt + 1'b1;
    end
  end

  always_comb begin
    done = (cnt >= CW'(DEADTIME));
    up   = s_q && done && (s == s_q);
    lw   = !s_q && done && (s == s_q);
  end

  a_no_shoot_through: assert property (@(posedge clk) disable iff (!clrn)
    !(up && lw));

endmodule
