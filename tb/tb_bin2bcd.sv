// tb_bin2bcd: converts corner and random 24-bit values and compares the
// eight digits with a decimal conversion done here; checks that each
// conversion takes 25 enabled cycles from start to done and that done lasts
// one enabled cycle. The enable is high one cycle in three.
module tb_bin2bcd;
  logic        clk = 0, rst = 1, en = 0, start = 0;
  logic [23:0] bin;
  logic [31:0] bcd;
  logic        done, busy;
  int checks = 0, failures = 0;

  bin2bcd dut (.clk, .rst, .en, .start, .bin, .bcd, .done, .busy);

  always #5 clk = ~clk;

  initial begin
    #50ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One enabled cycle; the two cycles after it have en low.
  task automatic step();
    en = 1;
    @(posedge clk); #1;
    en = 0;
    repeat (2) @(posedge clk);
    #1;
    #1;
  endtask

  function automatic logic [31:0] to_bcd(input int unsigned v);
    logic [31:0] r = '0;
    for (int d = 0; d < 8; d++) begin
      r[4*d +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

  task automatic convert(input int unsigned v);
    int steps = 0;
    bin = 24'(v); start = 1;
    step();
    start = 0;
    checks++;
    if (!busy) begin
      failures++;
      $display("FAIL conversion did not start");
    end
    while (!done && steps < 40) begin
      step();
      steps++;
    end
    checks++;
    if (steps != 24) begin
      failures++;
      $display("FAIL done after %0d steps, expected 24", steps);
    end
    checks++;
    if (bcd != to_bcd(v)) begin
      failures++;
      $display("FAIL %0d -> %h, expected %h", v, bcd, to_bcd(v));
    end
    step();
    checks++;
    if (done || busy) begin
      failures++;
      $display("FAIL done longer than one enabled cycle or still busy");
    end
  endtask

  initial begin
    bin = 0;
    repeat (2) @(posedge clk);
    #1;
    rst = 0;
    convert(150); convert(0); convert(16777215); convert(99999999 % 16777216);
    convert(9); convert(10); convert(12345678); convert(5555555);
    repeat (60) convert($urandom_range(0, 16777215));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
