// input_data_mem: frame store for the integer pixels of the reference frame.
//
// A simple dual-port RAM of DEPTH 8-bit words. The host writes the frame through
// the write port (wr_enb, wr_addr, wr_data), one pixel per clock, in raster order
// (address = y * frame width + x). The half-pel interpolator reads it back through
// the read port. Both ports are synchronous: rd_data shows the word at the rd_addr
// sampled on the previous rising edge. A write and a read of the same address in
// one cycle return the old word.
// Port names and the 7-bit write address (128 words) come from the design's
// schematics; the synchronous read is this design's choice (it maps onto block RAM).
module input_data_mem #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          wr_enb,
  input  logic [AW-1:0] wr_addr,
  input  fme_pkg::pixel_t wr_data,
  input  logic [AW-1:0] rd_addr,
  output fme_pkg::pixel_t rd_data
);
  fme_pkg::pixel_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_enb && (32'(wr_addr) < DEPTH)) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end
endmodule
