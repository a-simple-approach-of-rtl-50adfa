// tb_triangle - checks the 32-sample triangle carrier.
// Steps the carrier with a strobe every 5 clocks and compares each new sample
// with the expected sequence 224, 232, ..., 352, ..., 232 (step 8), checks
// that the value only changes right after a strobe, and that period_end is
// high exactly at the last sample (232, falling) of a period.
module tb_triangle;
  logic clk = 0, clrn = 0, cktri = 0;
  logic [8:0] tri_out;
  logic period_end;
  int checks = 0, failures = 0;

  triangle dut (.clk, .clrn, .cktri, .tri_out, .period_end);

  always #5 clk = ~clk;

  function automatic int expect_at(int k);
    automatic int p = k % 32;
    return (p <= 16) ? 224 + 8 * p : 224 + 8 * (32 - p);
  endfunction

  initial begin
    automatic int k = 0;
    repeat (2) @(posedge clk);
    clrn = 1;
    @(negedge clk);
    checks++; if (tri_out != 224 || period_end) begin failures++; $display("reset value %0d", tri_out); end
    for (int n = 0; n < 32 * 3; n++) begin
      @(negedge clk) cktri = 1;
      @(negedge clk) cktri = 0;
      k++;
      checks++;
      if (tri_out != 9'(expect_at(k))) begin failures++; $display("k=%0d tri=%0d exp=%0d", k, tri_out, expect_at(k)); end
      checks++;
      if (period_end != (k % 32 == 31)) begin failures++; $display("period_end wrong at k=%0d", k); end
      repeat (3) begin
        @(negedge clk);
        checks++; if (tri_out != 9'(expect_at(k))) begin failures++; $display("moved without strobe"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
