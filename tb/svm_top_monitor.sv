// svm_top_monitor - reference model and checker for the complete modulator.
//
// Watches the pins of svm_top and predicts them cycle by cycle from a model
// written in real arithmetic, sharing no code with the design:
//   - the reference angle advances one degree every SIN_DIV clocks, the
//     carrier one sample every TRI_DIV clocks (32 samples per period);
//   - at each carrier minimum the vector of that moment (round(128 cos),
//     round(128 sin)) is taken, its sector found by the three sign tests and
//     its two levels computed from the switching-time table (T = V_dc = 256
//     counts); the leg states of the 32 samples follow the five-segment rule;
//   - each leg state passes a turn-on-delay model of DT clocks to give the
//     expected gate pair.
// Before the first carrier minimum the generator holds its reset levels
// (sector I, both levels 0), and the model does the same. A period whose
// level lies within 0.02 of a rounding half is not compared (either rounding
// is correct); the gates are then skipped for that period plus DT clocks.
// Checked every clock: sector pins, six gates, no leg with both gates on.
// It also counts how often each mechanism occurred (each sector, odd periods
// with a leg held at 1, even periods with a leg held at 0, dead-time gaps,
// command pulses swallowed by the dead time, carrier periods, table wraps)
// and counts a failure for any that never occurred.
module svm_top_monitor #(
  parameter int TRI_DIV = 52,
  parameter int SIN_DIV = 1852,
  parameter int DT      = 67,
  parameter int N_TURNS = 1
) (
  input  logic       clk,
  input  logic       clrn,
  input  logic [2:0] sector_pins,
  input  logic [2:0] up,   // bit 0 = leg a, 1 = b, 2 = c
  input  logic [2:0] lw,
  output logic       done,
  output int         checks,
  output int         failures
);

  localparam real PI = 3.14159265358979;
  localparam real S3 = 1.7320508075688772;

  // legs: index 0 = a, 1 = b, 2 = c
  int held_leg [1:6] = '{0, 2, 1, 0, 2, 1};
  int a_leg    [1:6] = '{1, 0, 2, 1, 0, 2};
  int b_leg    [1:6] = '{2, 1, 0, 2, 1, 0};

  function automatic int rnd(real x);
    return (x >= 0.0) ? int'($floor(x + 0.5)) : -int'($floor(-x + 0.5));
  endfunction

  function automatic int sector_of(int va, int vb);
    bit c0 = vb > 0;
    bit c1 = real'(vb) > S3 * va;
    bit c2 = real'(vb) > -S3 * va;
    case ({c0, c1, c2})
      3'b101: return 1;
      3'b111: return 2;
      3'b110: return 3;
      3'b010: return 4;
      3'b000: return 5;
      3'b001: return 6;
      default: return 1;
    endcase
  endfunction

  function automatic real table_level(int sec, int a, int b, bit second);
    real k = 3.0 * 256.0 / 4.0 / 256.0;
    real t1 = k * (a - b / S3), t2 = k * (a + b / S3), t3 = k * 2.0 * b / S3;
    case (sec)
      1: return second ?  t2 :  t1;
      2: return second ?  t3 :  t2;
      3: return second ? -t1 :  t3;
      4: return second ? -t2 : -t1;
      5: return second ? -t3 : -t2;
      default: return second ? t1 : -t3;
    endcase
  endfunction

  // state of the current carrier period
  int  p_sec = 1;
  int  p_a = 0, p_b = 0;
  bit  p_ambiguous = 0;

  function automatic int clamp_round(real lv, inout bit amb);
    real fr = lv - $floor(lv);
    if (fr > 0.48 && fr < 0.52) amb = 1;
    lv = $floor(lv + 0.5);
    if (lv < 0.0) lv = 0.0;
    if (lv > 128.0) lv = 128.0;
    return int'(lv);
  endfunction

  longint c = 0;            // clock edges since reset release
  logic [2:0] ref_s = '0, ref_s_prev = '0;
  int steady [3] = '{1, 1, 1};
  longint skip_until = 0;
  int gap [3] = '{0, 0, 0};
  int run_len [3] = '{0, 0, 0};

  // mechanism counters
  int n_sector [1:6] = '{0, 0, 0, 0, 0, 0};
  int n_odd_periods = 0, n_even_periods = 0, n_gaps = 0, n_swallowed = 0;
  int n_periods = 0, n_wraps = 0, n_ambiguous = 0;
  int last_sector = 0, n_sector_steps = 0;

  initial begin
    done = 0; checks = 0; failures = 0;
  end

  always @(posedge clk) if (clrn && !done) begin
    c = c + 1;
    // carrier strobe n is sampled at edge TRI_DIV*n + 1, so its leg states
    // appear at edge TRI_DIV*n + 2
    if (c >= TRI_DIV + 2 && (c - 2) % TRI_DIV == 0) begin
      automatic longint n = (c - 2) / TRI_DIV;
      automatic int k = int'(n % 32);
      automatic int t = 8 * ((k <= 16) ? k : 32 - k);
      bit odd;
      logic [2:0] s;
      if (k == 0) begin
        // new period: vector latched at edge TRI_DIV*n + 1
        automatic longint e = TRI_DIV * n + 1;
        automatic int m = int'(((e - 3) / SIN_DIV) % 360);
        automatic int va = rnd(128.0 * $cos(m * PI / 180.0));
        automatic int vb = rnd(128.0 * $sin(m * PI / 180.0));
        automatic bit amb = 0;
        p_sec = sector_of(va, vb);
        p_a = clamp_round(table_level(p_sec, va, vb, 1'b0), amb);
        p_b = clamp_round(table_level(p_sec, va, vb, 1'b1), amb);
        p_ambiguous = amb;
        n_periods++;
        if (amb) n_ambiguous++;
        if (p_sec % 2) n_odd_periods++; else n_even_periods++;
      end
      odd = p_sec % 2;
      s[held_leg[p_sec]] = odd;
      s[a_leg[p_sec]] = odd ? (t > p_a) : (t < p_a);
      s[b_leg[p_sec]] = odd ? (t > p_b) : (t < p_b);
      if (p_ambiguous) skip_until = c + TRI_DIV + DT + 4;
      for (int l = 0; l < 3; l++)
        if (s[l] != ref_s[l]) begin
          if (run_len[l] > 0 && run_len[l] <= DT) n_swallowed++;
          run_len[l] = 0;
        end
      ref_s <= s;
    end
    for (int l = 0; l < 3; l++) begin
      steady[l] <= (ref_s[l] == ref_s_prev[l]) ? steady[l] + 1 : 1;
      run_len[l]++;
    end
    ref_s_prev <= ref_s;
  end

  // compare on the falling edge
  always @(negedge clk) if (clrn && !done && c > 0) begin
    // sector pins: table address m is on the outputs from edge SIN_DIV*m + 2
    automatic int m = int'((c >= 2 ? (c - 2) / SIN_DIV : 0) % 360);
    automatic int va = rnd(128.0 * $cos(m * PI / 180.0));
    automatic int vb = rnd(128.0 * $sin(m * PI / 180.0));
    automatic int es = sector_of(va, vb);
    checks++;
    if (int'(sector_pins) != es) begin
      failures++;
      if (failures < 20) $display("cycle %0d: sector %0d expected %0d (deg %0d)", c, sector_pins, es, m);
    end
    if (es != last_sector) begin
      if (last_sector != 0) begin
        n_sector_steps++;
        checks++;
        if (es != last_sector % 6 + 1) begin failures++; $display("sector %0d after %0d", es, last_sector); end
        if (es == 1) n_wraps++;
      end
      n_sector[es]++;
      last_sector = es;
    end
    for (int l = 0; l < 3; l++) begin
      automatic bit e_up = ref_s[l] && ref_s[l] == ref_s_prev[l] && steady[l] >= DT + 1;
      automatic bit e_lw = !ref_s[l] && ref_s[l] == ref_s_prev[l] && steady[l] >= DT + 1;
      checks++;
      if (up[l] && lw[l]) begin failures++; $display("cycle %0d: both gates of leg %0d on", c, l); end
      if (c >= skip_until) begin
        checks++;
        if (up[l] != e_up || lw[l] != e_lw) begin
          failures++;
          if (failures < 20) $display("cycle %0d leg %0d: up %b lw %b, expected %b %b", c, l, up[l], lw[l], e_up, e_lw);
        end
      end
      if (!up[l] && !lw[l]) gap[l]++;
      else begin
        if (gap[l] > 0 && c > DT + 2) begin
          n_gaps++;
          checks++;
          if (gap[l] < DT) begin failures++; $display("cycle %0d: dead time of %0d clocks on leg %0d", c, gap[l], l); end
        end
        gap[l] = 0;
      end
    end
    if (c >= longint'(N_TURNS) * 360 * SIN_DIV + 2 * TRI_DIV * 32) begin
      // mechanism coverage
      for (int s = 1; s <= 6; s++) begin
        checks++;
        if (n_sector[s] == 0) begin failures++; $display("sector %0d never reached", s); end
      end
      checks += 6;
      if (n_odd_periods == 0)  begin failures++; $display("no odd-sector period"); end
      if (n_even_periods == 0) begin failures++; $display("no even-sector period"); end
      if (n_gaps == 0)         begin failures++; $display("no dead-time gap"); end
      if (n_swallowed == 0)    begin failures++; $display("no swallowed pulse"); end
      if (n_wraps < N_TURNS)   begin failures++; $display("table did not wrap"); end
      // carrier periods per fundamental turn: 360*SIN_DIV / (32*TRI_DIV)
      if (n_periods < (N_TURNS * 360 * SIN_DIV) / (32 * TRI_DIV)) begin
        failures++; $display("only %0d carrier periods", n_periods);
      end
      $display("carrier periods %0d (%0d not compared), sector steps %0d, odd %0d, even %0d, dead-time gaps %0d, swallowed pulses %0d, turns %0d",
               n_periods, n_ambiguous, n_sector_steps, n_odd_periods, n_even_periods, n_gaps, n_swallowed, n_wraps);
      done = 1;
    end
  end

endmodule
