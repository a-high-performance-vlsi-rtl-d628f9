// tb_qpel_interpolation: checks the quarter-pel stage in both configurations of the
// design: the centre 4 x 4 block of a 10 x 10 frame (engine I, 20 x 20 half-pel grid)
// and of a 16 x 16 frame (engine II, 32 x 32 grid). Fails on any sample or latency
// mismatch, or if a class of quarter position never occurred.
module tb_qpel_interpolation;
  logic clk = 0;
  always #5 clk = ~clk;

  int c1, f1, k1 [3], c2, f2, k2 [3];
  logic d1, d2;

  tb_qpel_env #(.W(10), .H(10), .BX(3), .BY(3)) env1 (
    .clk(clk), .checks(c1), .failures(f1), .class_count(k1), .finished(d1));
  tb_qpel_env #(.W(16), .H(16), .BX(6), .BY(6)) env2 (
    .clk(clk), .checks(c2), .failures(f2), .class_count(k2), .finished(d2));

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2, f1 + f2 + 1);
    $finish;
  end

  initial begin
    int checks, failures;
    @(posedge clk);
    wait (d1 && d2);
    checks = c1 + c2;
    failures = f1 + f2;
    $display("quarter classes copied/axis/diagonal: %0d %0d %0d", k1[0] + k2[0], k1[1] + k2[1], k1[2] + k2[2]);
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (k1[k] == 0 || k2[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
