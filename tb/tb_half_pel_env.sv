// tb_half_pel_env: drives one half_pel_interpolation instance of a given frame size.
//
// Holds a behavioural frame store (synchronous read, like the RTL one), loads four
// test frames in turn (a three-level diagonal checkerboard, random pixels, stripes
// that drive the filter past 0 and 255, a flat frame), starts the block, checks the
// start-to-done latency of 6*W*H + 3 cycles and every one of the 4*W*H grid samples
// against fme_ref_pkg. Counts checks, failures and how often each sample kind
// (integer, horizontal, vertical, centre) and each clip direction occurred.
module tb_half_pel_env #(
  parameter int unsigned W = 10,
  parameter int unsigned H = 10
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output int   kind_count [4],
  output int   clip_lo,
  output int   clip_hi,
  output logic finished
);
  import fme_ref_pkg::*;
  localparam int unsigned N = W * H;
  localparam int unsigned IN_AW = $clog2(N);
  localparam int unsigned OUT_AW = $clog2(4 * N);

  logic reset, start, done;
  logic [IN_AW-1:0]  read_addr;
  logic [7:0]        input_data, op_rd_data;
  logic [OUT_AW-1:0] op_rd_addr;
  int img[];

  half_pel_interpolation #(.W(W), .H(H)) dut (.*);

  always_ff @(posedge clk) input_data <= 8'(img[read_addr]);

  function automatic void make_frame(input int kind);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        case (kind)
          0: img[y * W + x] = (((x - y) % 3 + 3) % 3 == 0) ? 'h80 : (((x - y) % 3 + 3) % 3 == 1) ? 'hc8 : 'h48;
          1: img[y * W + x] = int'($urandom_range(255));
          2: img[y * W + x] = (((x + 2 * y) % 4) < 2) ? 255 : 0;
          default: img[y * W + x] = 77;
        endcase
  endfunction

  initial begin
    checks = 0; failures = 0; clip_lo = 0; clip_hi = 0; finished = 0;
    foreach (kind_count[k]) kind_count[k] = 0;
    img = new[N];
    make_frame(3);
    reset = 1; start = 0; op_rd_addr = '0;
    repeat (3) @(negedge clk);
    reset = 0;
    for (int f = 0; f < 4; f++) begin
      int cyc;
      make_frame(f);
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cyc = 1;
      while (!done) begin
        @(negedge clk);
        cyc++;
      end
      checks++;
      if (cyc != 6 * N + 3) begin
        failures++;
        $display("FAIL W=%0d frame %0d: start to done %0d cycles, expected %0d", W, f, cyc, 6 * N + 3);
      end
      for (int gy = 0; gy < 2 * H; gy++)
        for (int gx = 0; gx < 2 * W; gx++) begin
          int exp, raw;
          op_rd_addr = OUT_AW'(gy * 2 * W + gx);
          @(negedge clk);
          exp = half_grid(img, W, H, gx, gy);
          kind_count[(gy % 2) * 2 + gx % 2]++;
          raw = (gy % 2 == 0 && gx % 2 == 1) ? fdiv(b1(img, W, H, gx / 2, gy / 2) + 16, 32) :
                (gy % 2 == 1 && gx % 2 == 0) ? fdiv(h1(img, W, H, gx / 2, gy / 2) + 16, 32) :
                (gy % 2 == 1 && gx % 2 == 1) ? fdiv(j1(img, W, H, gx / 2, gy / 2) + 512, 1024) : exp;
          if (raw < 0) clip_lo++;
          if (raw > 255) clip_hi++;
          checks++;
          if (int'(op_rd_data) != exp) begin
            failures++;
            if (failures < 10)
              $display("FAIL W=%0d frame %0d grid (%0d,%0d): got %0d exp %0d", W, f, gx, gy, op_rd_data, exp);
          end
        end
    end
    finished = 1;
  end
endmodule
