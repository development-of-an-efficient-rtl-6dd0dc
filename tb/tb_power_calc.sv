// tb_power_calc: checks P = v x i for corner and random operands, the
// one-cycle latency and that the output holds while en is low.
module tb_power_calc;
  logic clk = 0, rst = 1, en = 0;
  logic [4:0]  voltage;
  logic [10:0] current;
  logic [15:0] power;
  int checks = 0, failures = 0;

  power_calc dut (.clk, .rst, .en, .voltage, .current, .power);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int unsigned v, input int unsigned i);
    int unsigned exp;
    exp = v * i;
    voltage = 5'(v); current = 11'(i); en = 1;
    @(posedge clk); #1;
    en = 0;
    checks++;
    if (power != 16'(exp)) begin
      failures++;
      $display("FAIL %0d x %0d = %0d, expected %0d", v, i, power, exp);
    end
    voltage = 5'(v + 1);
    @(posedge clk); #1;
    checks++;
    if (power != 16'(exp)) begin
      failures++;
      $display("FAIL output changed without enable");
    end
  endtask

  initial begin
    voltage = 0; current = 0;
    repeat (2) @(posedge clk);
    #1;
    rst = 0;
    apply(5, 1500); apply(5, 429); apply(5, 20); apply(5, 83);
    apply(31, 2047); apply(0, 2047); apply(31, 0); apply(1, 1);
    repeat (300) apply($urandom_range(0, 31), $urandom_range(0, 2047));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
