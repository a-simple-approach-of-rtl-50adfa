// tb_ajust_freq - checks the two strobes of the frequency divider.
// Runs the divider at its default divisors and measures the spacing of
// consecutive cktri and cksin pulses: exactly TRI_DIV and SIN_DIV clocks,
// each pulse one clock wide, first pulse DIV clocks after reset release.
// That gives 20.03 kHz x 32 and 49.99 Hz x 360 at 33.33 MHz.
module tb_ajust_freq;
  localparam int TRI_DIV = 52;
  localparam int SIN_DIV = 1852;

  logic clk = 0, clrn = 0;
  logic cksin, cktri;
  int checks = 0, failures = 0;
  longint cyc = 0, last_tri = 0, last_sin = 0;
  int n_tri = 0, n_sin = 0;
  logic prev_tri = 0, prev_sin = 0;

  ajust_freq dut (.clk, .clrn, .cksin, .cktri);

  always #15 clk = ~clk;

  always @(posedge clk) if (clrn) begin
    cyc++;
    // sampled after the edge: the strobe seen now was set on this edge
    #1;
    if (cktri) begin
      checks++;
      if ((n_tri == 0 && cyc != TRI_DIV) || (n_tri > 0 && cyc - last_tri != TRI_DIV)) begin
        failures++; $display("cktri spacing wrong at %0d (last %0d)", cyc, last_tri);
      end
      last_tri = cyc; n_tri++;
      if (prev_tri) begin failures++; $display("cktri wider than one clock"); end
    end
    if (cksin) begin
      checks++;
      if ((n_sin == 0 && cyc != SIN_DIV) || (n_sin > 0 && cyc - last_sin != SIN_DIV)) begin
        failures++; $display("cksin spacing wrong at %0d (last %0d)", cyc, last_sin);
      end
      last_sin = cyc; n_sin++;
    end
    prev_tri = cktri; prev_sin = cksin;
  end

  initial begin
    repeat (3) @(posedge clk);
    clrn = 1;
    repeat (SIN_DIV * 12) @(posedge clk);
    #2;
    checks++;
    if (n_sin != 12 || n_tri != (SIN_DIV * 12) / TRI_DIV) begin
      failures++; $display("pulse counts wrong: sin %0d tri %0d", n_sin, n_tri);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(30 * 100000);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
