// fme_pkg: types and arithmetic shared by the fractional-pel interpolation engines.
//
// The engines work on 8-bit luma samples. Half-pel samples are produced by the
// H.264 six-tap filter (1, -5, 20, 20, -5, 1); the integer results of that filter
// are rounded, shifted and clipped back to 8 bits by the helpers below. Quarter-pel
// samples are the rounded-up mean of two neighbouring integer/half samples.
// The filter taps and rounding constants are those of the H.264 standard, which the
// design follows; the package layout itself is this design's own choice.
package fme_pkg;

  typedef logic [7:0] pixel_t;

  // Width of the unscaled first-stage filter result (b1/h1 in H.264 terms):
  // range -2550 .. 10710 fits in 16 signed bits.
  localparam int unsigned TAP1_W = 16;
  // Width of the second-stage result (j1): range -214200 .. 475320.
  localparam int unsigned TAP2_W = 21;

  // Clip an integer to the 8-bit sample range 0..255 (Clip1 of H.264).
  function automatic pixel_t clip1(input logic signed [31:0] v);
    if (v < 0)        return 8'd0;
    else if (v > 255) return 8'd255;
    else              return v[7:0];
  endfunction

  // First-stage result to sample: (v + 16) >> 5, clipped.
  function automatic pixel_t round_sh5(input logic signed [31:0] v);
    return clip1((v + 32'sd16) >>> 5);
  endfunction

  // Second-stage (centre) result to sample: (v + 512) >> 10, clipped.
  function automatic pixel_t round_sh10(input logic signed [31:0] v);
    return clip1((v + 32'sd512) >>> 10);
  endfunction

  // Quarter-pel average of two samples, rounding halves up.
  function automatic pixel_t avg2(input pixel_t a, input pixel_t b);
    logic [8:0] s;
    s = {1'b0, a} + {1'b0, b} + 9'd1;
    return pixel_t'(s >> 1);
  endfunction

  // Clamp a coordinate to 0..n-1 (frame-edge replication).
  function automatic int clampi(input int v, input int n);
    if (v < 0)      return 0;
    else if (v > n - 1) return n - 1;
    else            return v;
  endfunction

endpackage
