// tb_qpel_env: drives one qpel_interpolation instance.
//
// A behavioural half-pel grid memory (synchronous read) is filled with the reference
// half-pel grid of a W x H frame. After a `done` pulse the environment checks the
// start-to-done_qpel latency of (2*BS+1)^2 + 3 + 16*BS*BS cycles and every sample of
// the 4*BS x 4*BS quarter-pel output through both read ports against the reference
// quarter-pel table. Three frames are run: random, stripes that clip, and a diagonal
// checkerboard. Counts the quarter positions of each class: copied, averaged along an
// axis, averaged along a diagonal.
module tb_qpel_env #(
  parameter int unsigned W  = 10,
  parameter int unsigned H  = 10,
  parameter int unsigned BX = 3,
  parameter int unsigned BY = 3,
  parameter int unsigned BS = 4
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output int   class_count [3],
  output logic finished
);
  import fme_ref_pkg::*;
  localparam int unsigned GW = 2 * W, GH = 2 * H, QN = 4 * BS;
  localparam int unsigned IN_AW = $clog2(GW * GH);
  localparam int unsigned OUT_AW = $clog2(QN * QN);

  logic reset, done, done_qpel;
  logic [IN_AW-1:0]  op_rd_addr;
  logic [7:0]        op_rd_data, qpo_rd_data, hpel16_rd_data;
  logic [OUT_AW-1:0] qpo_rd_addr, hpel16_rd_addr;
  int img[];
  int grid[];

  qpel_interpolation #(.GW(GW), .GH(GH), .BX(BX), .BY(BY), .BS(BS)) dut (.*);

  always_ff @(posedge clk) op_rd_data <= 8'(grid[op_rd_addr]);

  initial begin
    checks = 0; failures = 0; finished = 0;
    foreach (class_count[k]) class_count[k] = 0;
    img = new[W * H];
    grid = new[GW * GH];
    foreach (grid[k]) grid[k] = 0;
    reset = 1; done = 0; qpo_rd_addr = '0; hpel16_rd_addr = '0;
    repeat (3) @(negedge clk);
    reset = 0;
    for (int f = 0; f < 3; f++) begin
      int cyc;
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++)
          img[y * W + x] = (f == 0) ? int'($urandom_range(255)) :
                           (f == 1) ? ((((x + y) % 4) < 2) ? 255 : 0) :
                                      (((x + 2 * y) % 3) * 90 + 20);
      for (int gy = 0; gy < GH; gy++)
        for (int gx = 0; gx < GW; gx++)
          grid[gy * GW + gx] = half_grid(img, W, H, gx, gy);
      @(negedge clk) done = 1;
      @(negedge clk) done = 0;
      cyc = 1;
      while (!done_qpel) begin
        @(negedge clk);
        cyc++;
      end
      checks++;
      if (cyc != (2 * BS + 1) * (2 * BS + 1) + 3 + QN * QN) begin
        failures++;
        $display("FAIL GW=%0d frame %0d: latency %0d", GW, f, cyc);
      end
      for (int qy = 0; qy < QN; qy++)
        for (int qx = 0; qx < QN; qx++) begin
          int exp;
          qpo_rd_addr = OUT_AW'(qy * QN + qx);
          hpel16_rd_addr = OUT_AW'((QN - 1 - qy) * QN + (QN - 1 - qx));
          @(negedge clk);
          exp = quarter(img, W, H, BX, BY, qx, qy);
          class_count[(qx % 2) + (qy % 2)]++;
          checks++;
          if (int'(qpo_rd_data) != exp) begin
            failures++;
            if (failures < 10)
              $display("FAIL GW=%0d frame %0d q(%0d,%0d): got %0d exp %0d", GW, f, qx, qy, qpo_rd_data, exp);
          end
          exp = quarter(img, W, H, BX, BY, QN - 1 - qx, QN - 1 - qy);
          checks++;
          if (int'(hpel16_rd_data) != exp) begin
            failures++;
            if (failures < 10)
              $display("FAIL GW=%0d frame %0d second port: got %0d exp %0d", GW, f, hpel16_rd_data, exp);
          end
        end
    end
    finished = 1;
  end
endmodule
