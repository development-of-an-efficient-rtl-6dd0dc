// tb_status_check: checks the one start pulse after reset, the answer to a
// done pulse one enabled cycle later, and that status is 0 otherwise.
module tb_status_check;
  logic clk = 0, rst = 1, en = 0, conv_done = 0;
  logic status;
  int checks = 0, failures = 0;

  status_check dut (.clk, .rst, .en, .conv_done, .status);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_status(input logic e, input string what);
    checks++;
    if (status !== e) begin
      failures++;
      $display("FAIL %s: status=%0b expected %0b", what, status, e);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1;
    expect_status(1, "during reset");
    rst = 0;
    @(posedge clk); #1;
    expect_status(1, "after reset, before first enable");
    en = 1;
    @(posedge clk); #1;
    expect_status(0, "after first enabled cycle");
    repeat (5) begin @(posedge clk); #1; expect_status(0, "idle"); end
    for (int k = 0; k < 50; k++) begin
      automatic logic d = 1'($urandom_range(0, 1));
      conv_done = d; en = 1;
      @(posedge clk); #1;
      expect_status(d, "follows done");
      en = 0; conv_done = 0;
      @(posedge clk); #1;
      expect_status(d, "held while en low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
