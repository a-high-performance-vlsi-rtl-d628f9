// tb_input_data_mem: checks the frame store.
// Fills all 128 words with random data, reads every word back (one-cycle read
// latency), then checks read-during-write of the same address (old data returned)
// and that a cycle without wr_enb leaves the word unchanged.
module tb_input_data_mem;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic wr_enb;
  logic [6:0] wr_addr, rd_addr;
  logic [7:0] wr_data, rd_data;
  logic [7:0] model [128];

  input_data_mem dut (.*);

  always #5 clk = ~clk;

  task automatic expect_eq(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h exp %02h", what, got, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_enb = 0; wr_addr = 0; wr_data = 0; rd_addr = 0;
    for (int a = 0; a < 128; a++) begin
      @(negedge clk);
      wr_enb = 1; wr_addr = 7'(a); wr_data = 8'($urandom); model[a] = wr_data;
    end
    @(negedge clk) wr_enb = 0;
    for (int a = 0; a < 128; a++) begin
      rd_addr = 7'(a);
      @(negedge clk);
      expect_eq(rd_data, model[a], $sformatf("read %0d", a));
    end
    // read during write of the same word returns the old word
    rd_addr = 7'd42; wr_addr = 7'd42; wr_data = ~model[42]; wr_enb = 1;
    @(negedge clk);
    expect_eq(rd_data, model[42], "read during write");
    model[42] = ~model[42];
    wr_enb = 0;
    @(negedge clk);
    expect_eq(rd_data, model[42], "read after write");
    // no write without wr_enb
    wr_addr = 7'd7; wr_data = ~model[7]; rd_addr = 7'd7;
    @(negedge clk);
    @(negedge clk);
    expect_eq(rd_data, model[7], "write disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
