// tb_digital_clock: runs the clock with 2 enabled cycles per second and a
// 3-day month for a little over three days and checks, every cycle, the six
// time digits, their segment codes, the day count, the one-cycle month_end
// pulse and the month indicator against time worked out from the cycle count.
module tb_digital_clock;
  localparam int unsigned ST  = 2;
  localparam int unsigned DPM = 3;
  logic clk = 0, rst = 1, en = 0;
  logic [5:0][3:0] digits;
  logic [5:0][6:0] digit_seg;
  logic [1:0]      day_count;
  logic            month_end, month_indicator;
  int checks = 0, failures = 0, month_ends = 0;
  // Clock-digit codes (g in bit 6, lit = 0) for 0-9.
  logic [6:0] code [10] = '{7'h40, 7'h79, 7'h24, 7'h30, 7'h19, 7'h12, 7'h02, 7'h78, 7'h00, 7'h10};

  digital_clock #(.SEC_TICKS(ST), .DAYS_PER_MONTH(DPM)) dut (
    .clk, .rst, .en, .digits, .digit_seg, .day_count, .month_end, .month_indicator);

  always #5 clk = ~clk;

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned n = 0;
    int bad = 0;
    repeat (2) @(posedge clk);
    #1;
    rst = 0;
    en = 1;
    while (n < longint'(ST) * 86400 * (DPM + 1) + 50) begin
      longint unsigned sec, tod, days;
      logic [5:0][3:0] e;
      logic e_end, e_ind;
      @(posedge clk); #1;
      n++;
      sec  = n / ST;
      tod  = sec % 86400;
      days = sec / 86400;
      e[0] = 4'(tod % 10);          e[1] = 4'((tod / 10) % 6);
      e[2] = 4'((tod / 60) % 10);   e[3] = 4'((tod / 600) % 6);
      e[4] = 4'((tod / 3600) % 10); e[5] = 4'(tod / 36000);
      e_end = (n % ST == 0) && tod == 0 && days % DPM == 0 && days > 0;
      e_ind = days % DPM == 0 && days > 0;
      checks++;
      if (digits != e || day_count != 2'(days % DPM) || month_end != e_end ||
          month_indicator != e_ind) begin
        failures++;
        if (bad++ < 10)
          $display("FAIL n=%0d: %h day %0d end %0b ind %0b, expected %h day %0d end %0b ind %0b",
                   n, digits, day_count, month_end, month_indicator, e, days % DPM, e_end, e_ind);
      end
      if (month_end) month_ends++;
      if (n % 997 == 0) begin
        for (int g = 0; g < 6; g++) begin
          checks++;
          if (digit_seg[g] != code[e[g]]) begin
            failures++;
            $display("FAIL segment code of digit %0d", g);
          end
        end
      end
    end
    checks++;
    if (month_ends != 1) begin
      failures++;
      $display("FAIL %0d month ends, expected 1", month_ends);
    end
    // Hold without enable.
    begin
      automatic logic [5:0][3:0] held = digits;
      en = 0;
      repeat (10) @(posedge clk);
      #1;
      checks++;
      if (digits != held) begin failures++; $display("FAIL clock ran without enable"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
