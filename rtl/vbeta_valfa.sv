// vbeta_valfa - reference voltage vector generator (V_alpha, V_beta).
//
// A modulo-N_ADDR address counter (N_ADDR = 360, one address per degree)
// advances on every cksin strobe and addresses two look-up tables:
//   vbeta_sin = BASE + round(AMP * sin(2*pi*addr/N_ADDR))
//   valfa_cos = BASE + round(AMP * cos(2*pi*addr/N_ADDR))
// so both outputs swing between LOWER (96) and UPPER (352) around BASE (224),
// the 9-bit unsigned coding of the source design. The table size and coding
// follow the source design; filling the tables at elaboration with a constant
// function (an integer Taylor series, accurate far below one count), rather
// than from a stored file, is this design's choice. round() rounds halves away
// from zero, symmetrically about BASE.
// Timing: the address changes one clock after a cksin strobe and the table
// outputs are registered, so new values appear two clocks after the strobe.
// Reset (async, active low) sets the address to 0 (angle 0).
module vbeta_valfa
  import svm_pkg::*;
#(
  parameter int unsigned N_ADDR = 360
) (
  input  logic  clk,
  input  logic  clrn,
  input  logic  cksin,
  output word_t vbeta_sin,
  output word_t valfa_cos
);

  localparam int AW = $clog2(N_ADDR);

  typedef word_t lut_t [N_ADDR];

  localparam longint Q        = 28;
  localparam longint PI_Q     = 64'd843314857;   // pi * 2^28
  localparam longint TWO_PI_Q = 64'd1686629713;  // 2 pi * 2^28

  // round(AMP * sin(2*pi*a/n)) by a Taylor series in Q28 fixed point.
  function automatic int amp_sin(input longint a, input longint n);
    longint x, xm, x2, term, sum;
    int     mag;
    bit neg;
    x = (a * TWO_PI_Q) / n;
    if (2 * x <= PI_Q)          begin xm = x;            neg = 1'b0; end
    else if (x <= PI_Q)         begin xm = PI_Q - x;     neg = 1'b0; end
    else if (2 * x <= 3 * PI_Q) begin xm = x - PI_Q;     neg = 1'b1; end
    else                        begin xm = TWO_PI_Q - x; neg = 1'b1; end
    x2   = (xm * xm) >>> Q;
    term = xm;
    sum  = xm;
    for (longint i = 1; i <= 7; i++) begin
      term = -((term * x2) >>> Q) / ((2 * i) * (2 * i + 1));
      sum  = sum + term;
    end
    mag = int'((longint'(AMP) * sum + (64'sd1 <<< (Q - 1))) >>> Q);
    return neg ? -mag : mag;
  endfunction

  function automatic lut_t build_lut(input longint quarter_offset);
    lut_t   t;
    longint ph;
    for (int a = 0; a < int'(N_ADDR); a++) begin
      ph   = (longint'(a) * 4 + quarter_offset) % (4 * longint'(N_ADDR));
      t[a] = word_t'(BASE + amp_sin(ph, 4 * longint'(N_ADDR)));
    end
    return t;
  endfunction

  localparam lut_t SIN_LUT = build_lut(0);
  localparam lut_t COS_LUT = build_lut(longint'(N_ADDR));  // cos = sin shifted by 90 deg

  logic [AW-1:0] addr;

  always_ff @(posedge clk or negedge clrn) begin
    if (!clrn) addr <= '0;
    else if (cksin) addr <= (addr == AW'(N_ADDR - 1)) ? '0 : addr + 1'b1;
  end

  always_ff @(posedge clk or negedge clrn) begin
    if (!clrn) begin
      vbeta_sin <= word_t'(BASE);
      valfa_cos <= word_t'(BASE + AMP);
    end else begin
      vbeta_sin <= SIN_LUT[addr];
      valfa_cos <= COS_LUT[addr];
    end
  end

  // Both table outputs stay inside the LOWER..UPPER band of the coding.
  a_table_range: assert property (@(posedge clk) disable iff (!clrn)
    vbeta_sin >= word_t'(LOWER) && vbeta_sin <= word_t'(UPPER) &&
    valfa_cos >= word_t'(LOWER) && valfa_cos <= word_t'(UPPER));

endmodule
