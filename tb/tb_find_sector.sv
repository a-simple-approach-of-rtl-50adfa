// tb_find_sector - checks the sector finder against the vector angle.
// Random reference vectors (radius 4..128 counts, coded offset 224) are fed
// to the block; the expected sector is floor(angle/60 deg) + 1 from atan2 in
// real arithmetic. Vectors within 0.05 deg of a sector border are skipped,
// since there the fixed-point sqrt(3) may fall either way. A sweep over the
// 360 one-degree table angles (radius 128) checks every sector in turn.
module tb_find_sector;
  import svm_pkg::*;
  word_t v_beta, v_alfa;
  sector_e sector;
  int checks = 0, failures = 0;
  int seen [7];

  find_sector dut (.v_beta, .v_alfa, .sector);

  localparam real PI = 3.14159265358979;

  task automatic try_vec(int va, int vb);
    real ang = $atan2(real'(vb), real'(va)) * 180.0 / PI;
    real rem;
    int exp_sec;
    if (ang < 0.0) ang += 360.0;
    rem = ang - 60.0 * $floor(ang / 60.0);
    if (rem < 0.05 || rem > 59.95) return;
    exp_sec = int'($floor(ang / 60.0)) + 1;
    v_alfa = word_t'(224 + va);
    v_beta = word_t'(224 + vb);
    #1;
    checks++;
    seen[exp_sec]++;
    if (int'(sector) != exp_sec) begin
      failures++;
      $display("va=%0d vb=%0d angle=%f sector=%0d exp=%0d", va, vb, ang, sector, exp_sec);
    end
  endtask

  initial begin
    for (int d = 0; d < 360; d++)
      try_vec(int'($floor(128.0 * $cos(d * PI / 180.0) + 0.5)),
              int'($floor(128.0 * $sin(d * PI / 180.0) + 0.5)));
    for (int n = 0; n < 20000; n++) begin
      automatic real r = 4.0 + real'($urandom_range(1240)) / 10.0;
      automatic real t = real'($urandom_range(359999)) / 1000.0 * PI / 180.0;
      try_vec(int'($floor(r * $cos(t) + 0.5)), int'($floor(r * $sin(t) + 0.5)));
    end
    for (int s = 1; s <= 6; s++) begin
      checks++;
      if (seen[s] == 0) begin failures++; $display("sector %0d never tested", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
