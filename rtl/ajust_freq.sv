// ajust_freq - frequency divider of the modulator.
//
// Two free-running modulo counters on the 33.33 MHz board clock produce two
// one-clock strobes:
//   cksin : every SIN_DIV clocks; steps the 360-entry reference vector table,
//           so the fundamental is f_clk / (SIN_DIV * 360) = 49.99 Hz.
//   cktri : every TRI_DIV clocks; steps the 32-sample triangle carrier, so the
//           carrier is f_clk / (TRI_DIV * 32) = 20.03 kHz (TRI_DIV = 26 gives
//           the 40 kHz setting).
// The source design divides the board clock to get a 20 kHz carrier from a
// 32-sample triangle and a 50 Hz fundamental; the divisor values are chosen
// here to produce exactly those rates (its printed divisor of 13 alone would
// give 80 kHz). The strobes are clock enables in the clk domain rather than
// derived clocks. Reset is asynchronous, active low; the first strobe of each
// kind comes DIV clocks after reset is released.
module ajust_freq #(
  parameter int unsigned TRI_DIV = 52,
  parameter int unsigned SIN_DIV = 1852
) (
  input  logic clk,
  input  logic clrn,
  output logic cksin,
  output logic cktri
);

  localparam int TW = $clog2(TRI_DIV);
  localparam int SW = $clog2(SIN_DIV);

  logic [TW-1:0] tri_cnt;
  logic [SW-1:0] sin_cnt;

  always_ff @(posedge clk or negedge clrn) begin
    if (!clrn) begin
      tri_cnt <= '0;
      cktri   <= 1'b0;
    end else if (tri_cnt == TW'(TRI_DIV - 1)) begin
      tri_cnt <= '0;
      cktri   <= 1'b1;
    end else begin
      tri_cnt <= tri_cnt + 1'b1;
      cktri   <= 1'b0;
    end
  end

  always_ff @(posedge clk or negedge clrn) begin
    if (!clrn) begin
      sin_cnt <= '0;
      cksin   <= 1'b0;
    end else if (sin_cnt == SW'(SIN_DIV - 1)) begin
      sin_cnt <= '0;
      cksin   <= 1'b1;
    end else begin
      sin_cnt <= sin_cnt + 1'b1;
      cksin   <= 1'b0;
    end
  end

endmodule
