// tb_scale_down: drives currents 0..65535 mA (the published test points,
// corners around the divisor and saturation, and random values) and
// compares the output with min(current / 10, 2047), worked out here.
module tb_scale_down;
  logic [15:0] current_ma;
  logic [10:0] current_scaled;
  int checks = 0, failures = 0;

  scale_down dut (.current_ma, .current_scaled);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int unsigned ma);
    int unsigned exp;
    exp = ma / 10;
    if (exp > 2047) exp = 2047;
    current_ma = 16'(ma);
    #1;
    checks++;
    if (current_scaled != 11'(exp)) begin
      failures++;
      $display("FAIL %0d mA -> %0d, expected %0d", ma, current_scaled, exp);
    end
  endtask

  initial begin
    // Published test points: 15000, 4291, 209, 832 mA.
    apply(15000); apply(4291); apply(209); apply(832);
    apply(0); apply(9); apply(10); apply(19999); apply(20479); apply(20480); apply(65535);
    repeat (500) apply($urandom_range(0, 65535));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
