// fractional_me_e1: interpolation engine I - half pel followed by quarter pel for one frame.
//
// A frame of W x H 8-bit pixels is written into the frame store (c1) through
// wr_enb / wr_addr / wr_data (address = y * W + x). A one-cycle `start` pulse makes
// the half-pel stage (c2) read the frame and build its 2W x 2H half-pel grid with the
// H.264 6-tap filter; its `done` pulse starts the quarter-pel stage (c3), which
// derives the 4*BS x 4*BS quarter-pel grid of the BS x BS block at (BX, BY) by
// averaging. `done_qpel` pulses when that grid is complete; it is read through
// qpo_rd_addr / qpo_rd_data (one-cycle latency, address = qy * 4*BS + qx). A second,
// independent read port (hpel16_rd_addr / hpel16_rd_data) hands the same grid to
// engine II.
//
// Timing with the defaults (10 x 10 frame, 4 x 4 block): the half-pel stage takes
// 6*W*H + 3 = 603 cycles, the quarter-pel stage 9*9 + 3 + 256 = 340 more, so done_qpel
// follows start after 943 cycles.
//
// The three instances, their names and ports follow the design's schematics of engine
// I; the 10 x 10 frame follows the frames the design was demonstrated on, and the
// 128-word store its 7-bit write address. Block position and size defaults
// (the centre 4 x 4 block) are this design's choice.
module fractional_me_e1
  import fme_pkg::*;
#(
  parameter int unsigned W         = 10,
  parameter int unsigned H         = 10,
  parameter int unsigned MEM_DEPTH = 128,
  parameter int unsigned BS        = 4,
  parameter int unsigned BX        = (W - BS) / 2,
  parameter int unsigned BY        = (H - BS) / 2,
  parameter int unsigned WR_AW     = $clog2(MEM_DEPTH),
  parameter int unsigned Q_AW      = $clog2(16 * BS * BS)
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             start,
  input  logic             wr_enb,
  input  logic [WR_AW-1:0] wr_addr,
  input  pixel_t           wr_data,
  input  logic [Q_AW-1:0]  qpo_rd_addr,
  output pixel_t           qpo_rd_data,
  input  logic [Q_AW-1:0]  hpel16_rd_addr,
  output pixel_t           hpel16_rd_data,
  output logic             done_qpel
);
  localparam int unsigned F_AW = $clog2(W * H);
  localparam int unsigned G_AW = $clog2(4 * W * H);

  if (W * H > MEM_DEPTH) begin : g_bad_mem
    $error("fractional_me_e1: frame does not fit the frame store");
  end

  logic [F_AW-1:0] read_addr;
  pixel_t          rd_data;
  logic [G_AW-1:0] op_rd_addr;
  pixel_t          op_rd_data;
  logic            hp_done;

  input_data_mem #(.DEPTH(MEM_DEPTH)) c1 (
    .clk     (clk),
    .wr_enb  (wr_enb),
    .wr_addr (wr_addr),
    .wr_data (wr_data),
    .rd_addr (WR_AW'(read_addr)),
    .rd_data (rd_data)
  );

  half_pel_interpolation #(.W(W), .H(H)) c2 (
    .clk        (clk),
    .reset      (reset),
    .start      (start),
    .read_addr  (read_addr),
    .input_data (rd_data),
    .op_rd_addr (op_rd_addr),
    .op_rd_data (op_rd_data),
    .done       (hp_done)
  );

  qpel_interpolation #(.GW(2 * W), .GH(2 * H), .BX(BX), .BY(BY), .BS(BS)) c3 (
    .clk            (clk),
    .reset          (reset),
    .done           (hp_done),
    .op_rd_addr     (op_rd_addr),
    .op_rd_data     (op_rd_data),
    .qpo_rd_addr    (qpo_rd_addr),
    .qpo_rd_data    (qpo_rd_data),
    .hpel16_rd_addr (hpel16_rd_addr),
    .hpel16_rd_data (hpel16_rd_data),
    .done_qpel      (done_qpel)
  );
endmodule
