// qpel_interpolation: quarter-pel samples of one 4x4 block from the half-pel grid.
//
// When `done` (the half-pel stage's completion pulse) arrives, the block copies the
// (2*BS+1) x (2*BS+1) window of the half-pel grid that covers the BS x BS block whose
// top-left integer pixel is (BX, BY) into a window register file, one sample per
// clock through op_rd_addr / op_rd_data (synchronous read, one-cycle latency, grid
// address = row * GW + column). It then writes the 4*BS x 4*BS quarter-pel grid of
// the block into its output RAM, one sample per clock in raster order. With the
// window index (r, c) = half-grid offset from (2*BY, 2*BX), quarter position
// (qy, qx) is:
//   * both even:       the integer/half sample at (qy/2, qx/2);
//   * one of them odd: the mean of the two samples either side along that axis;
//   * both odd:        the mean of the two diagonal samples of the half-grid cell
//                      (qy>>1 .. +1, qx>>1 .. +1) that are themselves half pels of the
//                      b/h kind (one odd grid coordinate), as H.264 prescribes; the
//                      integer and centre samples of the cell are not used.
// Means round halves up: (a + b + 1) >> 1.
// `done_qpel` pulses for one cycle after the last sample is written. The output can
// be read through two independent synchronous ports: qpo_rd_addr / qpo_rd_data (to
// the outside) and hpel16_rd_addr / hpel16_rd_data (feeding the second engine's
// half-pel stage), address = qy * 4*BS + qx. A `done` while busy is ignored.
//
// Timing: (2*BS+1)^2 + 2 cycles of window load, then 16*BS*BS cycles of output, then
// one cycle to done_qpel.
//
// Port names, the second read port and the use as both c3 (engine I) and c5
// ("qpel_interpolation_e4", engine II) come from the design's schematics; the 4x4
// block comes from the design's per-4x4-block fractional search. The choice of block
// (the centre of the frame by default), the window register file and the sequential
// schedule are this design's own choices.
module qpel_interpolation
  import fme_pkg::*;
#(
  parameter int unsigned GW     = 20,   // half-pel grid width  (2 x frame width)
  parameter int unsigned GH     = 20,   // half-pel grid height (2 x frame height)
  parameter int unsigned BX     = 3,    // integer x of the block's top-left pixel
  parameter int unsigned BY     = 3,    // integer y of the block's top-left pixel
  parameter int unsigned BS     = 4,    // block size in integer pixels
  parameter int unsigned IN_AW  = $clog2(GW * GH),
  parameter int unsigned OUT_AW = $clog2(16 * BS * BS)
) (
  input  logic              clk,
  input  logic              reset,
  input  logic              done,          // start: half-pel grid is ready
  // half-pel grid read port
  output logic [IN_AW-1:0]  op_rd_addr,
  input  pixel_t            op_rd_data,
  // quarter-pel output read ports
  input  logic [OUT_AW-1:0] qpo_rd_addr,
  output pixel_t            qpo_rd_data,
  input  logic [OUT_AW-1:0] hpel16_rd_addr,
  output pixel_t            hpel16_rd_data,
  output logic              done_qpel
);
  localparam int unsigned WN = 2 * BS + 1;   // window edge
  localparam int unsigned QN = 4 * BS;       // quarter grid edge

  // the window must lie inside the half-pel grid
  if (2 * (BX + BS) >= GW || 2 * (BY + BS) >= GH) begin : g_bad_window
    $error("qpel_interpolation: block window leaves the half-pel grid");
  end

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_OUT} state_t;
  state_t state;

  pixel_t win [WN][WN];
  pixel_t q_mem [QN * QN];

  localparam int unsigned WB = $clog2(WN);
  localparam int unsigned QB = $clog2(QN);

  logic [WB-1:0] lr, lc;     // window position presented this cycle
  logic          issuing;    // lr/lc is a real request
  logic          ld_valid;   // op_rd_data holds the previous request
  logic [WB-1:0] vr, vc;     // its window position
  logic [QB-1:0] qx, qy;     // output position

  assign op_rd_addr = issuing ? IN_AW'((2 * BY + 32'(lr)) * GW + 2 * BX + 32'(lc)) : '0;

  // quarter sample at (qy, qx)
  pixel_t q_sample;
  always_comb begin
    int unsigned r0, c0;
    r0 = 32'(qy >> 1);
    c0 = 32'(qx >> 1);
    unique case ({qy[0], qx[0]})
      2'b00:   q_sample = win[r0][c0];
      2'b01:   q_sample = avg2(win[r0][c0], win[r0][c0 + 1]);
      2'b10:   q_sample = avg2(win[r0][c0], win[r0 + 1][c0]);
      default: begin
        // window origin (2BY, 2BX) is even, so window parity = grid parity
        if (((r0 + c0) & 1) == 0) q_sample = avg2(win[r0][c0 + 1], win[r0 + 1][c0]);
        else                      q_sample = avg2(win[r0][c0], win[r0 + 1][c0 + 1]);
      end
    endcase
  end

  always_ff @(posedge clk) begin
    done_qpel <= 1'b0;
    if (reset) begin
      state    <= S_IDLE;
      issuing  <= 1'b0;
      ld_valid <= 1'b0;
      lr <= '0; lc <= '0; vr <= '0; vc <= '0; qx <= '0; qy <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (done) begin
          state    <= S_LOAD;
          issuing  <= 1'b1;
          ld_valid <= 1'b0;
          lr <= '0; lc <= '0;
        end
        S_LOAD: begin
          if (ld_valid) win[vr][vc] <= op_rd_data;
          ld_valid <= issuing;
          vr <= lr; vc <= lc;
          if (issuing) begin
            if (32'(lc) == WN - 1) begin
              lc <= '0;
              if (32'(lr) == WN - 1) issuing <= 1'b0;
              else lr <= lr + 1;
            end else lc <= lc + 1;
          end else if (!ld_valid) begin
            state <= S_OUT;
            qx <= '0; qy <= '0;
          end
        end
        S_OUT: begin
          q_mem[32'(qy) * QN + 32'(qx)] <= q_sample;
          if (32'(qx) == QN - 1) begin
            qx <= '0;
            if (32'(qy) == QN - 1) begin
              state     <= S_IDLE;
              done_qpel <= 1'b1;
            end else qy <= qy + 1;
          end else qx <= qx + 1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    qpo_rd_data    <= q_mem[qpo_rd_addr];
    hpel16_rd_data <= q_mem[hpel16_rd_addr];
  end

  // Window requests stay inside the half-pel grid.
  assert property (@(posedge clk) disable iff (reset)
                   issuing |-> 32'(op_rd_addr) < GW * GH);
endmodule
