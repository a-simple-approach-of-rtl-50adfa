// triangle - digital triangle carrier of the SVM generator.
//
// One carrier period has SAMPLES samples (32): a 5-bit phase counter k
// advances on every cktri strobe, and the output is BASE + STEP*k on the
// rising half and BASE + STEP*(SAMPLES-k) on the falling half, with
// STEP = 2*AMP/SAMPLES = 8. So the carrier runs 224, 232, ..., 352, ..., 232
// and repeats, as the source design specifies (9-bit unsigned, lower 224,
// upper 352, 32 samples per period). period_end is high while k = SAMPLES-1, the
// last sample before the carrier minimum: the strobe that ends a period is
// where the SVM generator latches its new levels. The output
// is decoded from the registered phase counter and changes one clock after a
// cktri strobe; reset (async, active low) starts the carrier at its minimum,
// which is this design's choice.
module triangle
  import svm_pkg::*;
#(
  parameter int unsigned SAMPLES = 32
) (
  input  logic  clk,
  input  logic  clrn,
  input  logic  cktri,
  output word_t tri_out,
  output logic  period_end
);

  localparam int KW   = $clog2(SAMPLES);
  localparam int HALF = SAMPLES / 2;
  localparam int STEP = AMP / HALF;

  logic [KW-1:0] k;

  always_ff @(posedge clk or negedge clrn) begin
    if (!clrn) k <= '0;
    else if (cktri) k <= (k == KW'(SAMPLES - 1)) ? '0 : k + 1'b1;
  end

  always_comb begin
    if (int'(k) <= HALF) tri_out = word_t'(BASE + STEP * int'(k));
    else                 tri_out = word_t'(BASE + STEP * (SAMPLES - int'(k)));
    period_end = (k == KW'(SAMPLES - 1));
  end

endmodule
