// six_tap_filter: the H.264 half-pel FIR filter, one result per evaluation.
//
// Computes y = e - 5f + 20g + 20h - 5i + j on six signed inputs, combinationally.
// The half-pel interpolator uses one instance across a row of integer samples
// (horizontal half pels b1), one down a column of integer samples (vertical half
// pels h1) and one down a column of b1 values (centre half pels j1). The result is
// left unscaled; rounding, shifting and clipping happen in the caller, because the
// centre sample needs the unscaled b1 values.
//
// Interface: IN_W-bit signed inputs e..j (e and j are the outer taps), OUT_W-bit
// signed output y. No clock; zero latency.
// The taps follow the 6-tap interpolation filter the design is built on; writing the
// multiplications as shifts and adds is this design's choice.
module six_tap_filter #(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned OUT_W = 21
) (
  input  logic signed [IN_W-1:0]  e,
  input  logic signed [IN_W-1:0]  f,
  input  logic signed [IN_W-1:0]  g,
  input  logic signed [IN_W-1:0]  h,
  input  logic signed [IN_W-1:0]  i,
  input  logic signed [IN_W-1:0]  j,
  output logic signed [OUT_W-1:0] y
);
  logic signed [OUT_W-1:0] outer, mid, side;

  always_comb begin
    outer = OUT_W'(e) + OUT_W'(j);
    mid   = OUT_W'(g) + OUT_W'(h);
    side  = OUT_W'(f) + OUT_W'(i);
    // 20*mid = 16*mid + 4*mid ; 5*side = 4*side + side
    y = outer + (mid <<< 4) + (mid <<< 2) - (side <<< 2) - side;
  end
endmodule
