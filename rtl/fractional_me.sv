// fractional_me: two-engine fractional-pel interpolator (engine II top).
//
// Engine I (fractional_me_e1) turns a W x H frame into its half-pel grid and then into
// the quarter-pel grid of one BS x BS block: a (4*BS) x (4*BS) = 16 x 16 image of
// quarter-pel samples. Engine II treats that 16 x 16 quarter-pel image as a frame of
// its own and repeats both steps on it: its half-pel stage (c4, the 16 x 16 variant)
// reads engine I's output through its second read port, and its quarter-pel stage
// (c5) produces the quarter-pel grid of the BS x BS block at (BX2, BY2) of that image,
// i.e. a further refinement between the quarter-pel positions found by engine I.
//
// Interface: the frame is written through wr_enb / wr_addr / wr_data (address =
// y * W + x). A one-cycle `start` runs both engines back to back. done_qpel pulses
// when engine I's result can be read through qpo_rd_addr / qpo_rd_data; done_qpel_e4
// pulses when engine II's result can be read through qpo_rd_addr_e4 /
// qpo_rd_data_e4. Both reads have one cycle of latency; address = qy * 4*BS + qx.
// Reset is synchronous and active high.
//
// Timing with the defaults: done_qpel 943 cycles after start; engine II then needs
// 6*256 + 3 = 1539 cycles for its half-pel grid and 340 for its quarter-pel grid, so
// done_qpel_e4 follows start after 2822 cycles.
//
// The structure (engine I's three blocks plus a 16 x 16 half-pel stage and a second
// quarter-pel stage) and the port names follow the design's schematics; there the five
// blocks sit side by side, here engine I is one sub-module. The schematic of the top
// shows done_qpel only; done_qpel_e4 is brought out as well so that a user can tell
// when engine II's result is ready.
module fractional_me
  import fme_pkg::*;
#(
  parameter int unsigned W         = 10,
  parameter int unsigned H         = 10,
  parameter int unsigned MEM_DEPTH = 128,
  parameter int unsigned BS        = 4,
  parameter int unsigned BX        = (W - BS) / 2,
  parameter int unsigned BY        = (H - BS) / 2,
  parameter int unsigned BX2       = (4 * BS - BS) / 2,
  parameter int unsigned BY2       = (4 * BS - BS) / 2,
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
  input  logic [Q_AW-1:0]  qpo_rd_addr_e4,
  output pixel_t           qpo_rd_data_e4,
  output logic             done_qpel,
  output logic             done_qpel_e4
);
  localparam int unsigned QE   = 4 * BS;                // engine II frame edge
  localparam int unsigned G_AW = $clog2(4 * QE * QE);

  logic [Q_AW-1:0] hpel16_rd_addr;
  pixel_t          hpel16_rd_data;
  logic [G_AW-1:0] op_rd_addr_e2;
  pixel_t          op_rd_data_e2;
  logic            hp16_done;
  logic [Q_AW-1:0] unused_rd_addr;
  pixel_t          unused_rd_data;

  fractional_me_e1 #(
    .W(W), .H(H), .MEM_DEPTH(MEM_DEPTH), .BS(BS), .BX(BX), .BY(BY)
  ) u_engine1 (
    .clk            (clk),
    .reset          (reset),
    .start          (start),
    .wr_enb         (wr_enb),
    .wr_addr        (wr_addr),
    .wr_data        (wr_data),
    .qpo_rd_addr    (qpo_rd_addr),
    .qpo_rd_data    (qpo_rd_data),
    .hpel16_rd_addr (hpel16_rd_addr),
    .hpel16_rd_data (hpel16_rd_data),
    .done_qpel      (done_qpel)
  );

  half_pel_interpolation #(.W(QE), .H(QE)) c4 (
    .clk        (clk),
    .reset      (reset),
    .start      (done_qpel),
    .read_addr  (hpel16_rd_addr),
    .input_data (hpel16_rd_data),
    .op_rd_addr (op_rd_addr_e2),
    .op_rd_data (op_rd_data_e2),
    .done       (hp16_done)
  );

  // c5's second output port has no user in this design: it is tied off.
  assign unused_rd_addr = '0;

  qpel_interpolation #(.GW(2 * QE), .GH(2 * QE), .BX(BX2), .BY(BY2), .BS(BS)) c5 (
    .clk            (clk),
    .reset          (reset),
    .done           (hp16_done),
    .op_rd_addr     (op_rd_addr_e2),
    .op_rd_data     (op_rd_data_e2),
    .qpo_rd_addr    (qpo_rd_addr_e4),
    .qpo_rd_data    (qpo_rd_data_e4),
    .hpel16_rd_addr (unused_rd_addr),
    .hpel16_rd_data (unused_rd_data),
    .done_qpel      (done_qpel_e4)
  );
endmodule
