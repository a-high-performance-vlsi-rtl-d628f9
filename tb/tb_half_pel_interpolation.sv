// tb_half_pel_interpolation: checks the half-pel stage at both sizes the design uses,
// a 10 x 10 frame (engine I) and a 16 x 16 frame (engine II), one environment each.
// Fails if any grid sample or latency differs, or if a sample kind or a clip
// direction never occurred.
module tb_half_pel_interpolation;
  logic clk = 0;
  always #5 clk = ~clk;

  int c10, f10, k10 [4], lo10, hi10;
  int c16, f16, k16 [4], lo16, hi16;
  logic d10, d16;

  tb_half_pel_env #(.W(10), .H(10)) env10 (
    .clk(clk), .checks(c10), .failures(f10), .kind_count(k10),
    .clip_lo(lo10), .clip_hi(hi10), .finished(d10));
  tb_half_pel_env #(.W(16), .H(16)) env16 (
    .clk(clk), .checks(c16), .failures(f16), .kind_count(k16),
    .clip_lo(lo16), .clip_hi(hi16), .finished(d16));

  initial begin
    repeat (40000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c10 + c16, f10 + f16 + 1);
    $finish;
  end

  initial begin
    int checks, failures;
    @(posedge clk);
    wait (d10 && d16);
    checks = c10 + c16;
    failures = f10 + f16;
    $display("sample kinds G/b/h/j: %0d %0d %0d %0d", k10[0] + k16[0], k10[1] + k16[1],
             k10[2] + k16[2], k10[3] + k16[3]);
    $display("clipped low %0d, high %0d", lo10 + lo16, hi10 + hi16);
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (k10[k] == 0 || k16[k] == 0) failures++;
    end
    checks += 2;
    if (lo10 + lo16 == 0) failures++;
    if (hi10 + hi16 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
