// tb_six_tap_filter: checks the 6-tap filter against a direct weighted sum.
// Corner cases (all 0, all 255, worst negative and positive b1 mixes, worst j1
// inputs) and 2000 random input sets are compared with
// e - 5f + 20g + 20h - 5i + j computed with multiplications.
module tb_six_tap_filter;
  int checks = 0, failures = 0;
  logic signed [15:0] e, f, g, h, i, j;
  logic signed [20:0] y;

  six_tap_filter dut (.*);

  task automatic check(input int ve, vf, vg, vh, vi, vj);
    int exp;
    e = 16'(ve); f = 16'(vf); g = 16'(vg); h = 16'(vh); i = 16'(vi); j = 16'(vj);
    #1;
    exp = ve - 5 * vf + 20 * vg + 20 * vh - 5 * vi + vj;
    checks++;
    if (int'(y) != exp) begin
      failures++;
      $display("FAIL %0d %0d %0d %0d %0d %0d: got %0d exp %0d", ve, vf, vg, vh, vi, vj, y, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 0, 0, 0, 0, 0);
    check(255, 255, 255, 255, 255, 255);
    check(0, 255, 0, 0, 255, 0);
    check(255, 0, 255, 255, 0, 255);
    check(10710, -2550, 10710, 10710, -2550, 10710);
    check(-2550, 10710, -2550, -2550, 10710, -2550);
    for (int n = 0; n < 2000; n++) begin
      if (n < 1000)
        check($urandom_range(255), $urandom_range(255), $urandom_range(255),
              $urandom_range(255), $urandom_range(255), $urandom_range(255));
      else
        check(int'($urandom_range(13260)) - 2550, int'($urandom_range(13260)) - 2550,
              int'($urandom_range(13260)) - 2550, int'($urandom_range(13260)) - 2550,
              int'($urandom_range(13260)) - 2550, int'($urandom_range(13260)) - 2550);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
