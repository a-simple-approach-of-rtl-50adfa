// tb_svm_generator - checks whole carrier periods of the SVM generator.
// A carrier strobe comes every 4 clocks. For 240 reference vectors (40 per
// sector, random angle and radius) the vector and its sector are applied at a
// random point of a period; from the next full period on, the leg states
// after each of the 32 strobes are recorded and checked:
//   - the held leg is 1 (odd sector) or 0 (even sector) for all 32 samples;
//   - each switching leg is high for as many samples as the carrier spends
//     above (odd) / below (even) its level, the level taken from the
//     switching-time table in real arithmetic (T = V_dc = 256 counts);
//   - sample j equals sample 32-j (symmetrical period);
//   - the centre sample (carrier peak) is the null state 111 / 000;
//   - the outputs change only on the clock edge after the one that samples
//     a strobe.
module tb_svm_generator;
  import svm_pkg::*;
  logic clk = 0, clrn = 0, cktri = 0;
  sector_e sector;
  word_t v_alfa, v_beta;
  logic sa, sb, sc;
  int checks = 0, failures = 0;
  int strobes = 0;

  svm_generator dut (.clk, .clrn, .cktri, .sector, .v_alfa, .v_beta, .sa, .sb, .sc);

  always #5 clk = ~clk;

  localparam real PI = 3.14159265358979;
  localparam real S3 = 1.7320508075688772;

  int held_leg [1:6] = '{0, 2, 1, 0, 2, 1};
  int a_leg    [1:6] = '{1, 0, 2, 1, 0, 2};
  int b_leg    [1:6] = '{2, 1, 0, 2, 1, 0};

  // carrier strobe every 4 clocks, set on a negedge
  int div = 0;
  always @(negedge clk) if (clrn) begin
    div   <= (div == 3) ? 0 : div + 1;
    cktri <= (div == 3);
  end
  always @(posedge clk) if (clrn && cktri) strobes++;
  logic [2:0] hist;   // leg states just before the latest edge
  always @(posedge clk) hist <= {sa, sb, sc};

  // number of carrier samples (0, 8, ..., 128, ..., 8) above / below a level
  function automatic int n_above(real lv);
    int n = 0;
    for (int k = 0; k < 32; k++) if (real'(8 * ((k <= 16) ? k : 32 - k)) > lv) n++;
    return n;
  endfunction
  function automatic int n_below(real lv);
    int n = 0;
    for (int k = 0; k < 32; k++) if (real'(8 * ((k <= 16) ? k : 32 - k)) < lv) n++;
    return n;
  endfunction

  function automatic real level_of(int sec, real a, real b, bit second);
    real k1 = 0.75 * (a - b / S3), k2 = 0.75 * (a + b / S3), k3 = 0.75 * 2.0 * b / S3;
    real r;
    case (sec)
      1: r = second ?  k2 :  k1;
      2: r = second ?  k3 :  k2;
      3: r = second ? -k1 :  k3;
      4: r = second ? -k2 : -k1;
      5: r = second ? -k3 : -k2;
      default: r = second ? k1 : -k3;
    endcase
    return r;
  endfunction

  // count for a level, accepting either rounding when the level is near a half
  function automatic bit count_ok(int got, real lv, bit odd);
    real lo = $floor(lv + 0.5), hi = lo;
    real fr = lv - $floor(lv);
    if (fr > 0.48 && fr < 0.52) begin lo = $floor(lv); hi = lo + 1.0; end
    if (lo < 0.0) lo = 0.0;
    if (hi > 128.0) hi = 128.0;
    if (lo > 128.0) lo = 128.0;
    if (hi < 0.0) hi = 0.0;
    return odd ? (got == n_above(lo) || got == n_above(hi))
               : (got == n_below(lo) || got == n_below(hi));
  endfunction

  initial begin
    logic [2:0] st [32];
    repeat (3) @(posedge clk);
    clrn = 1;
    for (int n = 0; n < 240; n++) begin
      automatic int sec = (n % 6) + 1;
      automatic real r = 20.0 + real'($urandom_range(1080)) / 10.0;
      automatic real t = ((sec - 1) * 60.0 + 0.5 + real'($urandom_range(59000)) / 1000.0) * PI / 180.0;
      automatic int va = int'($floor(r * $cos(t) + 0.5));
      automatic int vb = int'($floor(r * $sin(t) + 0.5));
      automatic bit odd = sec % 2;
      int cnt [3];
      int start;
      // apply at a random point
      repeat ($urandom_range(128)) @(negedge clk);
      v_alfa = word_t'(224 + va);
      v_beta = word_t'(224 + vb);
      sector = sector_e'(sec);
      // wait for the start of the next full period (strobe count multiple of 32)
      @(posedge clk iff (cktri && (strobes % 32 == 31)));
      start = strobes + 1;
      for (int j = 0; j < 32; j++) begin
        // strobe j of the period has been sampled at this edge; the outputs
        // must not move on it, only on the next edge
        @(negedge clk);
        checks++;
        if ({sa, sb, sc} != hist) begin failures++; $display("output moved on the strobe edge"); end
        @(negedge clk);
        st[j] = {sa, sb, sc};
        @(negedge clk);
        checks++;
        if ({sa, sb, sc} != st[j]) begin failures++; $display("output moved without strobe"); end
        if (j < 31) @(posedge clk iff cktri);
      end
      cnt = '{0, 0, 0};
      for (int j = 0; j < 32; j++) for (int l = 0; l < 3; l++) cnt[l] += int'(st[j][2 - l]);
      checks += 3;
      if (cnt[held_leg[sec]] != (odd ? 32 : 0)) begin
        failures++; $display("vec %0d sec %0d held leg switched (%0d)", n, sec, cnt[held_leg[sec]]);
      end
      if (!count_ok(cnt[a_leg[sec]], level_of(sec, va, vb, 1'b0), odd)) begin
        failures++; $display("vec %0d sec %0d leg A count %0d level %f", n, sec, cnt[a_leg[sec]], level_of(sec, va, vb, 1'b0));
      end
      if (!count_ok(cnt[b_leg[sec]], level_of(sec, va, vb, 1'b1), odd)) begin
        failures++; $display("vec %0d sec %0d leg B count %0d level %f", n, sec, cnt[b_leg[sec]], level_of(sec, va, vb, 1'b1));
      end
      for (int j = 1; j < 16; j++) begin
        checks++;
        if (st[j] != st[32 - j]) begin failures++; $display("asymmetric period, sample %0d", j); end
      end
      checks++;
      if (st[16] != (odd ? 3'b111 : 3'b000)) begin failures++; $display("centre state %b in sector %0d", st[16], sec); end
      if (start % 32 != 0) begin failures++; $display("misaligned"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
