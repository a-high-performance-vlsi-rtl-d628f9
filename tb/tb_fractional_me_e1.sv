// tb_fractional_me_e1: end-to-end check of engine I at its default size.
// Writes 10 x 10 frames through the write port, pulses start, checks that done_qpel
// comes 943 cycles later and that all 256 quarter-pel samples of the centre 4 x 4
// block match the reference, on both read ports. Frames: a three-level diagonal
// checkerboard, random pixels, and clipping stripes.
module tb_fractional_me_e1;
  import fme_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, reset, start, wr_enb, done_qpel;
  logic [6:0] wr_addr;
  logic [7:0] wr_data, qpo_rd_data, hpel16_rd_data;
  logic [7:0] qpo_rd_addr, hpel16_rd_addr;
  int img[];

  fractional_me_e1 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    img = new[100];
    reset = 1; start = 0; wr_enb = 0; wr_addr = 0; wr_data = 0;
    qpo_rd_addr = 0; hpel16_rd_addr = 0;
    repeat (3) @(negedge clk);
    reset = 0;
    for (int f = 0; f < 3; f++) begin
      int cyc;
      for (int y = 0; y < 10; y++)
        for (int x = 0; x < 10; x++) begin
          img[y * 10 + x] = (f == 0) ? ((((x - y) % 3 + 3) % 3) * 64 + 60) :
                            (f == 1) ? int'($urandom_range(255)) :
                                       (((x % 4) < 2) ? 255 : 0);
          @(negedge clk);
          wr_enb = 1; wr_addr = 7'(y * 10 + x); wr_data = 8'(img[y * 10 + x]);
        end
      @(negedge clk) begin wr_enb = 0; start = 1; end
      @(negedge clk) start = 0;
      cyc = 1;
      while (!done_qpel) begin
        @(negedge clk);
        cyc++;
      end
      checks++;
      if (cyc != 943) begin
        failures++;
        $display("FAIL frame %0d: start to done_qpel %0d cycles, expected 943", f, cyc);
      end
      for (int a = 0; a < 256; a++) begin
        int exp;
        qpo_rd_addr = 8'(a);
        hpel16_rd_addr = 8'(255 - a);
        @(negedge clk);
        exp = quarter(img, 10, 10, 3, 3, a % 16, a / 16);
        checks++;
        if (int'(qpo_rd_data) != exp) begin
          failures++;
          if (failures < 10) $display("FAIL frame %0d q%0d: got %0d exp %0d", f, a, qpo_rd_data, exp);
        end
        exp = quarter(img, 10, 10, 3, 3, (255 - a) % 16, (255 - a) / 16);
        checks++;
        if (int'(hpel16_rd_data) != exp) begin
          failures++;
          if (failures < 10) $display("FAIL frame %0d second port q%0d: got %0d exp %0d", f, 255 - a, hpel16_rd_data, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
