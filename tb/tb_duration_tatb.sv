// tb_duration_tatb - checks the T_a + T_b level against the switching-time table.
// Random vectors in each sector (radius up to 128 counts) are applied with
// their sector; the expected level is the table entry evaluated in real
// arithmetic with T = 256 counts (half period = carrier height 128) and
// V_dc = 256 counts, rounded and clamped to 0..128, plus the offset 224.
// Where the real value lies within 0.02 of a rounding half, either neighbour
// is accepted (the block uses 12-bit fixed-point constants).
module tb_duration_tatb;
  import svm_pkg::*;
  word_t v_alfa, v_beta, level;
  sector_e sector;
  int checks = 0, failures = 0;

  duration_tatb dut (.v_alfa, .v_beta, .sector, .level);

  localparam real PI  = 3.14159265358979;
  localparam real T   = 256.0;
  localparam real VDC = 256.0;
  localparam real S3  = 1.7320508075688772;

  // Switching-time table: columns T_a and T_a + T_b, sectors I..VI.
  function automatic real table_val(int sec, real a, real b, bit tatb);
    real k = 3.0 * T / 4.0;
    if (!tatb) case (sec)
      1: return k * (a / VDC - b / (S3 * VDC));
      2: return k * (a / VDC + b / (S3 * VDC));
      3: return k * (2.0 * b / (S3 * VDC));
      4: return k * (-a / VDC + b / (S3 * VDC));
      5: return k * (-a / VDC - b / (S3 * VDC));
      default: return -k * (2.0 * b / (S3 * VDC));
    endcase
    else case (sec)
      1: return k * (a / VDC + b / (S3 * VDC));
      2: return k * (2.0 * b / (S3 * VDC));
      3: return k * (-a / VDC + b / (S3 * VDC));
      4: return k * (-a / VDC - b / (S3 * VDC));
      5: return -k * (2.0 * b / (S3 * VDC));
      default: return k * (a / VDC - b / (S3 * VDC));
    endcase
  endfunction

  initial begin
    for (int n = 0; n < 30000; n++) begin
      automatic int sec = (n % 6) + 1;
      automatic real r = real'($urandom_range(1280)) / 10.0;
      automatic real t = ((sec - 1) * 60.0 + 0.1 + real'($urandom_range(59800)) / 1000.0) * PI / 180.0;
      automatic int va = int'($floor(r * $cos(t) + 0.5));
      automatic int vb = int'($floor(r * $sin(t) + 0.5));
      real e, fr;
      int lo, hi;
      e = table_val(sec, real'(va), real'(vb), 1'b1);
      if (e < 0.0) e = 0.0;
      if (e > 128.0) e = 128.0;
      lo = int'($floor(e + 0.5));
      hi = lo;
      fr = e - $floor(e);
      if (fr > 0.48 && fr < 0.52) begin lo = int'($floor(e)); hi = lo + 1; end
      v_alfa = word_t'(224 + va);
      v_beta = word_t'(224 + vb);
      sector = sector_e'(sec);
      #1;
      checks++;
      if (int'(level) < 224 + lo || int'(level) > 224 + hi) begin
        failures++;
        $display("sec %0d va %0d vb %0d level %0d exp %f", sec, va, vb, int'(level) - 224, e);
      end
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
