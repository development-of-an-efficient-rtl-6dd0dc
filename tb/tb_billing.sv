// tb_billing: steps the unit count, checks cost = units x TARIFF every
// cycle and the monthly units and bill latched at each month_end pulse.
module tb_billing;
  localparam int unsigned TARIFF = 7;
  logic        clk = 0, rst = 1;
  logic [23:0] units;
  logic        month_end;
  logic [23:0] cost, month_units, month_bill;
  int checks = 0, failures = 0;
  int unsigned last_month_start = 0;

  billing #(.TARIFF(TARIFF)) dut (.clk, .rst, .units, .month_end, .cost, .month_units, .month_bill);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    units = 0; month_end = 0;
    repeat (2) @(posedge clk);
    #1;
    rst = 0;
    for (int m = 0; m < 6; m++) begin
      automatic int unsigned used = $urandom_range(0, 400);
      if (m == 0) used = 150;
      for (int k = 0; k < used; k++) begin
        units = units + 1;
        @(posedge clk); #1;
        checks++;
        if (cost != 24'(units * TARIFF)) begin
          failures++;
          $display("FAIL cost %0d for %0d units", cost, units);
        end
      end
      month_end = 1;
      @(posedge clk); #1;
      month_end = 0;
      checks++;
      if (month_units != 24'(units - last_month_start) ||
          month_bill != 24'((units - last_month_start) * TARIFF)) begin
        failures++;
        $display("FAIL month %0d: units %0d bill %0d, expected %0d %0d", m, month_units,
                 month_bill, units - last_month_start, (units - last_month_start) * TARIFF);
      end
      last_month_start = units;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
