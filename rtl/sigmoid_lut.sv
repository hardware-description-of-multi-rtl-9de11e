// sigmoid_lut: activation function f(s) = 1 / (1 + e^-s) as a look-up table.
//
// The 23-bit accumulated sum (signed, 13 fraction bits) is mapped to an 8-bit
// activation (signed Q1.7, always 0..127). Only the transition zone of the
// sigmoid is stored: sums below -8.0 give 0, sums at or above +8.0 give 127,
// and the window in between is cut into 2^LUT_AW equal bins of 2^-6 each,
// addressed by sum bits [16:7] after offsetting by +8.0. Each entry holds
// round(128 * f(x_mid)) clipped to 127, x_mid being the bin centre.
// That a table stores only the useful transition zone is the published idea;
// the window, bin width and rounding are this design's choices.
//
// The table is computed at elaboration from the formula above, so no data
// file is needed. Purely combinational (a distributed ROM): output follows
// the input in the same cycle.
module sigmoid_lut #(
  parameter int unsigned ACC_W    = 23,
  parameter int unsigned OUT_W    = 8,
  parameter int unsigned SUM_FRAC = 13,
  parameter int unsigned LUT_AW   = 10
) (
  input  logic signed [ACC_W-1:0] sum,
  output logic        [OUT_W-1:0] act
);
  // window is +/- 8.0, i.e. +/- 2^(SUM_FRAC+3) sum codes
  localparam int unsigned WIN_LOG  = SUM_FRAC + 3;
  localparam int unsigned SHIFT    = WIN_LOG + 1 - LUT_AW;
  localparam int unsigned OUT_MAX  = (1 << (OUT_W - 1)) - 1;

  typedef logic [OUT_W-1:0] table_t [2**LUT_AW];

  function automatic table_t make_table();
    table_t t;
    for (int k = 0; k < 2**LUT_AW; k++) begin
      real x, y;
      x = (real'(k) + 0.5) * real'(1 << SHIFT) / real'(1 << SUM_FRAC) - 8.0;
      y = real'(OUT_MAX + 1) / (1.0 + $exp(-x));
      if (y > real'(OUT_MAX)) t[k] = OUT_W'(OUT_MAX);
      else                    t[k] = OUT_W'($rtoi(y + 0.5));
    end
    return t;
  endfunction

  localparam table_t TABLE = make_table();

  localparam logic signed [ACC_W-1:0] LO = -(ACC_W'(1) <<< WIN_LOG);
  localparam logic signed [ACC_W-1:0] HI =  (ACC_W'(1) <<< WIN_LOG);

  logic [WIN_LOG:0]  offs;
  logic [LUT_AW-1:0] idx;

  always_comb begin
    offs = (WIN_LOG+1)'(sum - LO);            // 0 .. 2^(WIN_LOG+1)-1 inside
    idx  = LUT_AW'(offs >> SHIFT);
    if (sum < LO)       act = '0;
    else if (sum >= HI) act = OUT_W'(OUT_MAX);
    else                act = TABLE[idx];
  end

endmodule
