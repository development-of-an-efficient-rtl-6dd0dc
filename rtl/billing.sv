// billing: turns billing units into a charge and closes the monthly bill.
//
// cost is the charge for every unit counted so far, units x TARIFF,
// registered every system cycle. When month_end pulses (from the digital
// clock's day counter) the units used since the previous month end are
// latched in month_units and their charge in month_bill, and the count for
// the next month starts from the current unit total. TARIFF is the price of
// one unit in the smallest money step; its default of 1 matches the
// published simulation, where the cost equals the unit count.
// Computing the charge and closing it at the month-end indicator is the
// published function; the tariff form and the latched monthly registers are
// this design's choices. Results wrap modulo 2^24.
module billing
  import meter_pkg::*;
#(
  parameter int unsigned TARIFF = 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [UNIT_W-1:0] units,
  input  logic              month_end,
  output logic [UNIT_W-1:0] cost,
  output logic [UNIT_W-1:0] month_units,
  output logic [UNIT_W-1:0] month_bill
);
  logic [UNIT_W-1:0] units_at_month_start;
  logic [UNIT_W-1:0] used;

  always_comb used = units - units_at_month_start;

  always_ff @(posedge clk) begin
    if (rst) begin
      cost                 <= '0;
      month_units          <= '0;
      month_bill           <= '0;
      units_at_month_start <= '0;
    end else begin
      cost <= UNIT_W'(units * UNIT_W'(TARIFF));
      if (month_end) begin
        month_units          <= used;
        month_bill           <= UNIT_W'(used * UNIT_W'(TARIFF));
        units_at_month_start <= units;
      end
    end
  end
endmodule
