// tb_deadtime_leg - checks dead-time insertion on one leg.
// Drives the command s with random hold times (1..300 clocks) and checks, on
// every clock, the gates against a reference: a gate is on iff the command
// has been steady for more than DEADTIME clocks and equals that gate's value
// (up for 1, lw for 0). Also checks that the two gates are never on together
// and that each gate turns on exactly DEADTIME+1 clocks after the edge.
module tb_deadtime_leg;
  localparam int DT = 67;
  logic clk = 0, clrn = 0, s = 0;
  logic up, lw;
  int checks = 0, failures = 0;
  int steady = 0;        // clocks since the last change of s, as seen by the DUT
  logic s_prev = 0;
  int n_on_up = 0, n_on_lw = 0, n_short = 0;

  deadtime_leg dut (.clk, .clrn, .s, .up, .lw);

  always #5 clk = ~clk;

  // reference: evaluated just before each rising edge
  always @(negedge clk) if (clrn) begin
    logic e_up, e_lw;
    e_up = s && (steady >= DT + 1);
    e_lw = !s && (steady >= DT + 1);
    checks++;
    if (up !== e_up || lw !== e_lw) begin
      failures++; $display("t=%0t s=%b steady=%0d up=%b lw=%b", $time, s, steady, up, lw);
    end
    checks++;
    if (up && lw) begin failures++; $display("shoot-through"); end
    if (up && steady == DT + 1) n_on_up++;
    if (lw && steady == DT + 1) n_on_lw++;
  end

  always @(posedge clk) if (clrn) begin
    if (s == s_prev) steady <= steady + 1; else steady <= 1;
    s_prev <= s;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) clrn = 1;
    for (int n = 0; n < 400; n++) begin
      automatic int hold = (n % 4 == 0) ? $urandom_range(DT, 1) : $urandom_range(300, 1);
      if (hold <= DT) n_short++;
      repeat (hold) @(negedge clk);
      #1 s = ~s;
    end
    repeat (200) @(negedge clk);
    checks++;
    if (n_on_up == 0 || n_on_lw == 0 || n_short == 0) begin
      failures++; $display("not all cases seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
