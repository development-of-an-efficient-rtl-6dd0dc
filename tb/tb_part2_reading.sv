// tb_part2_reading: the reading chain on its own, as in the published
// second integration: a unit count and a cost of 150 (0x000096) go through
// bin2bcd with its status_check restart loop into the two 8-digit displays.
// Checks that the first conversion starts from reset alone, that results
// are 00000150 within 26 enabled cycles, that the loop keeps converting
// (a new value is picked up), and that one full scan shows 7E on every
// digit except 5B (digit 1) and 30 (digit 2).
module tb_part2_reading;
  import meter_pkg::*;
  logic clk = 0, rst = 1, en = 0;
  logic [23:0] unit_in, cost_in;
  logic [31:0] unit_bcd, cost_bcd;
  logic        unit_status, unit_done, unit_busy, cost_status, cost_done, cost_busy;
  logic [6:0]  display_unit, display_bill;
  logic [7:0]  sel_unit, sel_bill;
  int checks = 0, failures = 0, n_conv = 0;
  logic [6:0] expect_code [8] = '{7'h7E, 7'h5B, 7'h30, 7'h7E, 7'h7E, 7'h7E, 7'h7E, 7'h7E};

  bin2bcd      u_b2b_unit  (.clk, .rst, .en, .start(unit_status), .bin(unit_in), .bcd(unit_bcd), .done(unit_done), .busy(unit_busy));
  status_check u_stat_unit (.clk, .rst, .en, .conv_done(unit_done), .status(unit_status));
  display      u_disp_unit (.clk, .rst, .en, .bcd(unit_bcd), .seg(display_unit), .digit_sel(sel_unit));
  bin2bcd      u_b2b_cost  (.clk, .rst, .en, .start(cost_status), .bin(cost_in), .bcd(cost_bcd), .done(cost_done), .busy(cost_busy));
  status_check u_stat_cost (.clk, .rst, .en, .conv_done(cost_done), .status(cost_status));
  display      u_disp_cost (.clk, .rst, .en, .bcd(cost_bcd), .seg(display_bill), .digit_sel(sel_bill));

  always #5 clk = ~clk;

  always @(negedge clk) if (!rst && en && unit_done) n_conv++;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    unit_in = 24'h000096;
    cost_in = 24'h000096;
    repeat (3) @(posedge clk);
    #1;
    rst = 0;
    en = 1;
    repeat (26) @(posedge clk);
    #1;
    checks++;
    if (unit_bcd != 32'h0000_0150 || cost_bcd != 32'h0000_0150) begin
      failures++;
      $display("FAIL readings %h %h, expected 00000150", unit_bcd, cost_bcd);
    end
    for (int s = 0; s < 8; s++) begin
      @(posedge clk); #1;
      for (int d = 0; d < 8; d++) begin
        if (sel_unit[d]) begin
          checks++;
          if (display_unit != expect_code[d] || display_bill != expect_code[d] || sel_bill != sel_unit) begin
            failures++;
            $display("FAIL digit %0d shows %h / %h, expected %h", d, display_unit, display_bill, expect_code[d]);
          end
        end
      end
    end
    // The loop keeps running: a new count appears within two conversions.
    unit_in = 24'd12345678;
    repeat (52) @(posedge clk);
    #1;
    checks++;
    if (unit_bcd != 32'h1234_5678) begin
      failures++;
      $display("FAIL new reading %h", unit_bcd);
    end
    checks++;
    if (n_conv < 3) begin
      failures++;
      $display("FAIL only %0d conversions", n_conv);
    end
    $display("conversions %0d", n_conv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
