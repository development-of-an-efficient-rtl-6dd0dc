// energy_meter_top: single-phase digital household energy meter.
//
// Voltage and current samples go in; the energy used, in units of 1 kWh,
// its charge, the time of day and an end-of-month indicator come out, on
// 7-segment displays and as binary values. All blocks run on the one system
// clock (20 MHz); clk_div makes a 100 Hz tick that every other block uses as
// its clock enable, so one sample is taken per tick.
//
// Datapath, one enabled stage per tick:
//   current_in -> scale_down (/10, 11 bits, combinational) -> power_calc
//   (x voltage_in,
//   16 bits) -> power_store (runs of constant power: level, total,
//   duration) -> energy_calc (P x t) -> energy_store (kWh units) ->
//   billing (units x TARIFF, monthly bill at month end).
// Reading:
//   units and cost each go through bin2bcd + status_check (a free-running
//   24-bit -> 8-digit converter) into a display that scans its eight
//   digits on display_*_seg / display_*_sel. digital_clock shows hh:mm:ss
//   on six more digits and raises month_end after 30 days, which closes the
//   bill. power_tot / clock_tot show the last finished constant-power run.
//
// Block split and connections follow the published block diagram; the
// tick-as-enable clocking and the extra binary outputs are this design's.
// rst is synchronous and active high.
module energy_meter_top
  import meter_pkg::*;
#(
  parameter int unsigned     DIV            = 200000,
  parameter int unsigned     SEC_TICKS      = 100,
  parameter int unsigned     DAYS_PER_MONTH = 30,
  parameter longint unsigned UNIT_ENERGY    = 64'd36_000_000_000,
  parameter int unsigned     TARIFF         = 1
) (
  input  logic                             clk,
  input  logic                             rst,
  input  logic [V_W-1:0]                   voltage_in,
  input  logic [IRAW_W-1:0]                current_in,
  output logic                             clk_100hz,
  output logic                             tick,
  output logic [P_W-1:0]                   power,
  output logic [PT_W-1:0]                  power_tot,
  output logic [T_W-1:0]                   clock_tot,
  output logic [UNIT_W-1:0]                units,
  output logic [UNIT_W-1:0]                cost,
  output logic [UNIT_W-1:0]                month_units,
  output logic [UNIT_W-1:0]                month_bill,
  output logic [BCD_W-1:0]                 units_bcd,
  output logic [BCD_W-1:0]                 cost_bcd,
  output logic [SEG_W-1:0]                 display_unit_seg,
  output logic [BCD_DIGITS-1:0]            display_unit_sel,
  output logic [SEG_W-1:0]                 display_bill_seg,
  output logic [BCD_DIGITS-1:0]            display_bill_sel,
  output logic [CLK_DIGITS-1:0][SEG_W-1:0] clock_seg,
  output logic [CLK_DIGITS-1:0][3:0]       clock_digits,
  output logic                             unit_pulse,
  output logic [$clog2(DAYS_PER_MONTH+1)-1:0] day_count,
  output logic                             month_end,
  output logic                             month_indicator
);
  logic [I_W-1:0]  current_scaled;
  logic            run_valid;
  logic [P_W-1:0]  run_power;
  logic            energy_valid;
  logic [E_W-1:0]  energy;
  logic            unit_status, unit_done;
  logic            bill_status, bill_done;

  clk_div #(.DIV(DIV)) u_clk_div (
    .clk, .rst, .clk_out(clk_100hz), .tick
  );

  scale_down u_scale_down (
    .current_ma(current_in), .current_scaled
  );

  power_calc u_power_calc (
    .clk, .rst, .en(tick), .voltage(voltage_in), .current(current_scaled), .power
  );

  power_store u_power_store (
    .clk, .rst, .en(tick), .power,
    .run_valid, .run_power, .power_tot, .clock_tot
  );

  energy_calc u_energy_calc (
    .clk, .rst, .run_valid, .run_power, .run_time(clock_tot),
    .energy_valid, .energy
  );

  energy_store #(.UNIT_ENERGY(UNIT_ENERGY)) u_energy_store (
    .clk, .rst, .energy_valid, .energy, .units, .unit_pulse, .residue()
  );

  digital_clock #(.SEC_TICKS(SEC_TICKS), .DAYS_PER_MONTH(DAYS_PER_MONTH)) u_digital_clock (
    .clk, .rst, .en(tick), .digits(clock_digits), .digit_seg(clock_seg),
    .day_count, .month_end, .month_indicator
  );

  billing #(.TARIFF(TARIFF)) u_billing (
    .clk, .rst, .units, .month_end, .cost, .month_units, .month_bill
  );

  // Energy reading: converter, its status loop and the scanned display.
  bin2bcd u_bin2bcd_energy (
    .clk, .rst, .en(tick), .start(unit_status), .bin(units),
    .bcd(units_bcd), .done(unit_done), .busy()
  );
  status_check u_status_energy (
    .clk, .rst, .en(tick), .conv_done(unit_done), .status(unit_status)
  );
  display u_display_energy (
    .clk, .rst, .en(tick), .bcd(units_bcd), .seg(display_unit_seg), .digit_sel(display_unit_sel)
  );

  // Billing reading.
  bin2bcd u_bin2bcd_bill (
    .clk, .rst, .en(tick), .start(bill_status), .bin(cost),
    .bcd(cost_bcd), .done(bill_done), .busy()
  );
  status_check u_status_bill (
    .clk, .rst, .en(tick), .conv_done(bill_done), .status(bill_status)
  );
  display u_display_bill (
    .clk, .rst, .en(tick), .bcd(cost_bcd), .seg(display_bill_seg), .digit_sel(display_bill_sel)
  );
endmodule
