// tb_vbeta_valfa - checks the sine/cosine reference tables.
// Steps the address through two full turns (720 strobes) and compares both
// outputs with 224 + round(128 sin/cos(deg)) computed with real arithmetic
// (halves rounded away from zero). Also checks the mod-360 wrap, that outputs
// do not move without a strobe, and the two-clock strobe-to-output latency.
module tb_vbeta_valfa;
  logic clk = 0, clrn = 0, cksin = 0;
  logic [8:0] vbeta_sin, valfa_cos;
  int checks = 0, failures = 0;

  vbeta_valfa dut (.clk, .clrn, .cksin, .vbeta_sin, .valfa_cos);

  always #5 clk = ~clk;

  function automatic int ref_val(real x);
    automatic real m = 128.0 * x;
    automatic int r = (m >= 0.0) ? int'($floor(m + 0.5)) : -int'($floor(-m + 0.5));
    return 224 + r;
  endfunction

  task automatic check_angle(int d);
    automatic real th = 3.14159265358979 * d / 180.0;
    checks += 2;
    if (vbeta_sin != 9'(ref_val($sin(th)))) begin
      failures++; $display("deg %0d sin %0d exp %0d", d, vbeta_sin, ref_val($sin(th)));
    end
    if (valfa_cos != 9'(ref_val($cos(th)))) begin
      failures++; $display("deg %0d cos %0d exp %0d", d, valfa_cos, ref_val($cos(th)));
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    clrn = 1;
    repeat (2) @(negedge clk);
    check_angle(0);
    for (int n = 1; n <= 720; n++) begin
      @(negedge clk) cksin = 1;
      @(negedge clk) cksin = 0;
      // one clock after the strobe the address has moved, outputs not yet
      checks++;
      if (vbeta_sin != 9'(ref_val($sin(3.14159265358979 * ((n - 1) % 360) / 180.0)))) begin
        failures++; $display("output moved too early at %0d", n);
      end
      @(negedge clk);
      check_angle(n % 360);
      @(negedge clk);
      check_angle(n % 360);
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
