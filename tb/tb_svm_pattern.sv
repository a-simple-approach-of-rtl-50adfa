// tb_svm_pattern - checks the five-segment switching rule.
// For random sectors, carrier samples and levels A <= B, the expected leg
// states are built from a per-sector description (which leg is held and at
// what value, which leg follows level A, which level B; odd sectors switch
// on above a level, even sectors below). Also checks that the held leg never
// switches and that the centre of the period (carrier peak, 352) gives the
// null state 111 in odd and 000 in even sectors.
module tb_svm_pattern;
  import svm_pkg::*;
  sector_e sector;
  word_t tri_in, level_a, level_b;
  logic sa, sb, sc;
  int checks = 0, failures = 0;

  svm_pattern dut (.sector, .tri_in, .level_a, .level_b, .sa, .sb, .sc);

  // legs: 0 = a, 1 = b, 2 = c
  int held_leg [1:6] = '{0, 2, 1, 0, 2, 1};
  int a_leg    [1:6] = '{1, 0, 2, 1, 0, 2};
  int b_leg    [1:6] = '{2, 1, 0, 2, 1, 0};

  initial begin
    for (int n = 0; n < 20000; n++) begin
      automatic int sec = $urandom_range(6, 1);
      automatic int a = $urandom_range(128), b = $urandom_range(128);
      automatic int t = (n % 7 == 0) ? 128 : 8 * $urandom_range(16);
      automatic bit odd = sec % 2;
      bit exp_s [3];
      if (n % 5 == 0) t = (n % 2) ? a : b;   // exercise equality
      if (a > b) begin int x = a; a = b; b = x; end
      exp_s[held_leg[sec]] = odd;
      exp_s[a_leg[sec]] = odd ? (t > a) : (t < a);
      exp_s[b_leg[sec]] = odd ? (t > b) : (t < b);
      sector = sector_e'(sec);
      tri_in = word_t'(224 + t);
      level_a = word_t'(224 + a);
      level_b = word_t'(224 + b);
      #1;
      checks++;
      if ({sa, sb, sc} != {exp_s[0], exp_s[1], exp_s[2]}) begin
        failures++;
        $display("sec %0d t %0d a %0d b %0d got %b%b%b exp %b%b%b", sec, t, a, b,
                 sa, sb, sc, exp_s[0], exp_s[1], exp_s[2]);
      end
      if (t == 128 && b < 128) begin
        checks++;
        if ({sa, sb, sc} != (odd ? 3'b111 : 3'b000)) begin
          failures++; $display("centre state wrong in sector %0d", sec);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
