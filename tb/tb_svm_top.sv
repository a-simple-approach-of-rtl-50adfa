// tb_svm_top - end-to-end test of the modulator at its default sizes.
// Runs svm_top (33.33 MHz clock, 20 kHz carrier, 50 Hz fundamental, 2 us
// dead time) for one full fundamental period (20 ms, 666,720 clocks) plus two
// carrier periods and has svm_top_monitor predict every sector and gate pin
// on every clock. Reset is released after 5 clocks.
module tb_svm_top;
  logic clk = 0, clrn = 0;
  logic sector2, sector1, sector0;
  logic sa_up, sa_lw, sb_up, sb_lw, sc_up, sc_lw;
  logic done;
  int checks, failures;
  int extra_checks = 0, extra_failures = 0;

  svm_top dut (
    .clk, .clrn, .sector2, .sector1, .sector0,
    .sa_up, .sa_lw, .sb_up, .sb_lw, .sc_up, .sc_lw
  );

  svm_top_monitor #(.TRI_DIV(52), .SIN_DIV(1852), .DT(67), .N_TURNS(1)) mon (
    .clk, .clrn,
    .sector_pins({sector2, sector1, sector0}),
    .up({sc_up, sb_up, sa_up}), .lw({sc_lw, sb_lw, sa_lw}),
    .done, .checks, .failures
  );

  always #15ns clk = ~clk;   // 30 ns period, 33.33 MHz

  initial begin
    repeat (5) @(posedge clk);
    @(negedge clk) clrn = 1;
    // right after reset: all gates off, sector I
    @(negedge clk);
    extra_checks++;
    if ({sa_up, sa_lw, sb_up, sb_lw, sc_up, sc_lw} != '0) begin
      extra_failures++; $display("gates on right after reset");
    end
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks + extra_checks, failures + extra_failures);
    $finish;
  end

  initial begin
    repeat (800000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + extra_checks, failures + extra_failures + 1);
    $finish;
  end
endmodule
