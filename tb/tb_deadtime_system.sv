// tb_deadtime_system - checks the three-leg dead-time unit.
// Drives the three leg states independently with random hold times and
// checks each pair of gate outputs, every clock, against a reference
// turn-on-delay model (gate on iff its state has been steady for more than
// DEADTIME clocks), that no leg ever has both gates on, and that the legs do
// not interfere. Also counts, per leg, gap intervals with both gates off,
// each of which must last at least DEADTIME clocks.
module tb_deadtime_system;
  localparam int DT = 67;
  logic clk = 0, clrn = 0;
  logic [2:0] s = '0;
  logic [2:0] up, lw;
  int checks = 0, failures = 0;
  int steady [3] = '{0, 0, 0};
  logic [2:0] s_prev = '0;
  int gap [3] = '{0, 0, 0};
  int n_gaps = 0;

  deadtime_system dut (
    .clk, .clrn, .sa(s[2]), .sb(s[1]), .sc(s[0]),
    .sa_up(up[2]), .sa_lw(lw[2]), .sb_up(up[1]), .sb_lw(lw[1]), .sc_up(up[0]), .sc_lw(lw[0])
  );

  always #5 clk = ~clk;

  always @(negedge clk) if (clrn) begin
    for (int l = 0; l < 3; l++) begin
      checks++;
      if (up[l] != (s[l] && steady[l] >= DT + 1) || lw[l] != (!s[l] && steady[l] >= DT + 1)) begin
        failures++; $display("leg %0d s=%b steady=%0d up=%b lw=%b", l, s[l], steady[l], up[l], lw[l]);
      end
      checks++;
      if (up[l] && lw[l]) begin failures++; $display("shoot-through leg %0d", l); end
      if (!up[l] && !lw[l]) gap[l]++;
      else begin
        if (gap[l] > 0) begin
          checks++; n_gaps++;
          if (gap[l] < DT) begin failures++; $display("gap of %0d clocks on leg %0d", gap[l], l); end
        end
        gap[l] = 0;
      end
    end
  end

  always @(posedge clk) if (clrn) begin
    for (int l = 0; l < 3; l++) steady[l] <= (s[l] == s_prev[l]) ? steady[l] + 1 : 1;
    s_prev <= s;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) clrn = 1;
    fork
      for (int n = 0; n < 300; n++) begin repeat ($urandom_range(250, 1)) @(negedge clk); #1 s[2] = ~s[2]; end
      for (int n = 0; n < 300; n++) begin repeat ($urandom_range(250, 1)) @(negedge clk); #1 s[1] = ~s[1]; end
      for (int n = 0; n < 300; n++) begin repeat ($urandom_range(250, 1)) @(negedge clk); #1 s[0] = ~s[0]; end
    join
    repeat (200) @(negedge clk);
    checks++;
    if (n_gaps < 300) begin failures++; $display("too few dead-time gaps: %0d", n_gaps); end
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
