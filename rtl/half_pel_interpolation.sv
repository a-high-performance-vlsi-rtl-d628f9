// half_pel_interpolation: builds the half-pel grid of one frame with the H.264 6-tap filter.
//
// On a one-cycle `start` pulse the block reads the W x H integer frame from the
// frame store (read_addr / input_data, one pixel per clock, one-cycle read latency)
// into a local pixel register file. It then runs two passes:
//   * row pass: for every integer position (x, y) the unscaled horizontal half pel
//     b1 = tap6(P[y][x-2 .. x+3]) is computed and kept (16-bit signed);
//   * grid pass: the 2W x 2H half-pel grid is written in raster order, one sample per
//     clock, into the output RAM. Grid position (2y+v, 2x+u) holds
//       (v,u) = (0,0)  G: the integer pixel P[y][x]
//       (0,1)  b: (b1 + 16) >> 5, clipped
//       (1,0)  h: (tap6(P[y-2 .. y+3][x]) + 16) >> 5, clipped
//       (1,1)  j: (tap6(b1[y-2 .. y+3][x]) + 512) >> 10, clipped
//     i.e. b lies between P[y][x] and P[y][x+1], h between P[y][x] and P[y+1][x],
//     and j in the middle of the four.
// Coordinates outside the frame are clamped to the nearest edge pixel.
// `done` pulses for one cycle after the last grid sample is written; the grid can then
// be read through op_rd_addr / op_rd_data (synchronous, one-cycle latency), address
// = row * 2W + column. A `start` while busy is ignored.
//
// Timing: W*H + 1 cycles to load, W*H for the row pass, 4*W*H for the grid pass,
// then one cycle to `done`: 6*W*H + 2 cycles from start to done.
//
// The block, its port names and its place between frame store and quarter-pel stage
// follow the design's schematics (instances c2 for the 10x10 frame of engine I and c4,
// "Half_pel_interpolation_16_16", for the 16x16 frame of engine II). The two-pass
// sequential schedule, the edge clamping and the grid address map are this design's
// own choices; the filter and rounding are those of H.264.
module half_pel_interpolation
  import fme_pkg::*;
#(
  parameter int unsigned W      = 10,
  parameter int unsigned H      = 10,
  parameter int unsigned IN_AW  = $clog2(W * H),
  parameter int unsigned OUT_AW = $clog2(4 * W * H)
) (
  input  logic              clk,
  input  logic              reset,
  input  logic              start,
  // frame store read port
  output logic [IN_AW-1:0]  read_addr,
  input  pixel_t            input_data,
  // half-pel grid read port
  input  logic [OUT_AW-1:0] op_rd_addr,
  output pixel_t            op_rd_data,
  output logic              done
);
  localparam int unsigned N  = W * H;
  localparam int unsigned GW = 2 * W;
  localparam int unsigned GN = 4 * W * H;

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_ROW, S_GRID} state_t;
  state_t state;

  pixel_t                    pix [H][W];
  logic signed [TAP1_W-1:0]  b1  [H][W];
  pixel_t                    grid_mem [GN];

  // load pass counters
  logic [IN_AW:0] ld_issue;      // address presented to the frame store this cycle
  logic           ld_valid;      // input_data holds the pixel requested last cycle
  logic [IN_AW:0] ld_idx;        // its index
  // row/grid pass coordinates
  int unsigned    px, py;        // row pass: integer coordinate
  int unsigned    gx, gy;        // grid pass: half-grid coordinate

  // ---------------- filters ----------------
  logic signed [TAP1_W-1:0] hin  [6];  // row pass: pixels along a row
  logic signed [TAP1_W-1:0] vin  [6];  // grid pass: pixels down a column
  logic signed [TAP1_W-1:0] jin  [6];  // grid pass: b1 down a column
  logic signed [TAP2_W-1:0] hsum, vsum, jsum;

  always_comb begin
    for (int k = 0; k < 6; k++) begin
      hin[k] = TAP1_W'(pix[clampi(int'(py), H)][clampi(int'(px) + k - 2, W)]);
      vin[k] = TAP1_W'(pix[clampi(int'(gy >> 1) + k - 2, H)][clampi(int'(gx >> 1), W)]);
      jin[k] = b1[clampi(int'(gy >> 1) + k - 2, H)][clampi(int'(gx >> 1), W)];
    end
  end

  six_tap_filter #(.IN_W(TAP1_W), .OUT_W(TAP2_W)) u_hfilt (
    .e(hin[0]), .f(hin[1]), .g(hin[2]), .h(hin[3]), .i(hin[4]), .j(hin[5]), .y(hsum));
  six_tap_filter #(.IN_W(TAP1_W), .OUT_W(TAP2_W)) u_vfilt (
    .e(vin[0]), .f(vin[1]), .g(vin[2]), .h(vin[3]), .i(vin[4]), .j(vin[5]), .y(vsum));
  six_tap_filter #(.IN_W(TAP1_W), .OUT_W(TAP2_W)) u_jfilt (
    .e(jin[0]), .f(jin[1]), .g(jin[2]), .h(jin[3]), .i(jin[4]), .j(jin[5]), .y(jsum));

  // sample written in the grid pass
  pixel_t grid_sample;
  always_comb begin
    unique case ({gy[0], gx[0]})
      2'b00:   grid_sample = pix[gy >> 1][gx >> 1];
      2'b01:   grid_sample = round_sh5(32'(b1[gy >> 1][gx >> 1]));
      2'b10:   grid_sample = round_sh5(32'(vsum));
      default: grid_sample = round_sh10(32'(jsum));
    endcase
  end

  assign read_addr = (32'(ld_issue) < N) ? ld_issue[IN_AW-1:0] : '0;

  // ---------------- control ----------------
  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (reset) begin
      state    <= S_IDLE;
      ld_issue <= '0;
      ld_valid <= 1'b0;
      ld_idx   <= '0;
      px <= 0; py <= 0; gx <= 0; gy <= 0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state    <= S_LOAD;
          ld_issue <= '0;
          ld_valid <= 1'b0;
        end
        S_LOAD: begin
          if (ld_valid) pix[32'(ld_idx) / W][32'(ld_idx) % W] <= input_data;
          if (32'(ld_issue) < N) begin
            ld_idx   <= ld_issue;
            ld_issue <= ld_issue + 1'b1;
            ld_valid <= 1'b1;
          end else begin
            ld_valid <= 1'b0;
            if (!ld_valid) begin
              state <= S_ROW;
              px <= 0; py <= 0;
            end
          end
        end
        S_ROW: begin
          // b1 lies in -2550 .. 10710, so the low TAP1_W bits hold it exactly
          b1[py][px] <= hsum[TAP1_W-1:0];
          if (px == W - 1) begin
            px <= 0;
            if (py == H - 1) begin
              state <= S_GRID;
              gx <= 0; gy <= 0;
            end else py <= py + 1;
          end else px <= px + 1;
        end
        S_GRID: begin
          grid_mem[gy * GW + gx] <= grid_sample;
          if (gx == GW - 1) begin
            gx <= 0;
            if (gy == 2 * H - 1) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else gy <= gy + 1;
          end else gx <= gx + 1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // grid read port
  always_ff @(posedge clk) op_rd_data <= grid_mem[op_rd_addr];

  // The load pass only ever asks for pixels of the frame.
  assert property (@(posedge clk) disable iff (reset)
                   state == S_LOAD |-> 32'(read_addr) < N);
endmodule
