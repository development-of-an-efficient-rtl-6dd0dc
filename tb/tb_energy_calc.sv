// tb_energy_calc: checks E = P x t and the one-cycle valid delay.
module tb_energy_calc;
  logic        clk = 0, rst = 1;
  logic        run_valid;
  logic [15:0] run_power, run_time;
  logic        energy_valid;
  logic [31:0] energy;
  int checks = 0, failures = 0;

  energy_calc dut (.clk, .rst, .run_valid, .run_power, .run_time, .energy_valid, .energy);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int unsigned p, input int unsigned t);
    longint unsigned exp = longint'(p) * longint'(t);
    run_power = 16'(p); run_time = 16'(t); run_valid = 1;
    @(posedge clk); #1;
    run_valid = 0;
    checks++;
    if (!energy_valid || energy != 32'(exp)) begin
      failures++;
      $display("FAIL %0d x %0d -> valid=%0b %0d, expected %0d", p, t, energy_valid, energy, exp);
    end
    run_power = 16'($urandom);
    @(posedge clk); #1;
    checks++;
    if (energy_valid || energy != 32'(exp)) begin
      failures++;
      $display("FAIL valid not one cycle or value not held");
    end
  endtask

  initial begin
    run_valid = 0; run_power = 0; run_time = 0;
    repeat (2) @(posedge clk);
    #1;
    rst = 0;
    @(posedge clk); #1;
    apply(7500, 3); apply(2145, 5); apply(100, 6); apply(65535, 65535); apply(0, 100);
    repeat (300) apply($urandom_range(0, 65535), $urandom_range(0, 65535));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
