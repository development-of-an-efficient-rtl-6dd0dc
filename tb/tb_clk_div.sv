// tb_clk_div: checks the divider's period, tick spacing and duty cycle.
// Uses DIV = 10 so a few periods run quickly; counts the system cycles
// between ticks and the cycles clk_out is high in each period.
module tb_clk_div;
  localparam int unsigned DIV = 10;
  logic clk = 0, rst = 1;
  logic clk_out, tick;
  int checks = 0, failures = 0;
  int cyc = 0, last_tick = -1, high_cnt = 0, ticks = 0;

  clk_div #(.DIV(DIV)) dut (.clk, .rst, .clk_out, .tick);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    while (ticks < 6) begin
      @(posedge clk);
      #1;
      cyc++;
      if (clk_out) high_cnt++;
      if (tick) begin
        ticks++;
        if (last_tick >= 0) begin
          checks++;
          if (cyc - last_tick != DIV) begin
            failures++;
            $display("FAIL tick spacing %0d, expected %0d", cyc - last_tick, DIV);
          end
          checks++;
          if (high_cnt != DIV / 2) begin
            failures++;
            $display("FAIL clk_out high for %0d cycles, expected %0d", high_cnt, DIV / 2);
          end
        end
        last_tick = cyc;
        high_cnt  = 0;
      end
    end
    // First tick after reset comes DIV cycles after release.
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
