// tb_meter_kwh: the first billing unit at the default energy scale.
// Only the divider is shortened (2 system cycles per sample); unit size,
// tariff, clock and month keep their defaults. A full-scale load, 15000 mA
// at voltage code 31 = 31 x 1500 = 46500 LSB per sample, holds one unit of
// energy after ceil(3.6e10 / 46500) = 774194 samples; the unit is counted
// when the run holding that sample is flushed, runs being 65535 samples
// long here because the run counter fills. The test checks
// that no unit appears one run before the expected one, that exactly one
// appears by the end of the run that crosses 1 kWh, the residue left over,
// and that cost and the BCD reading follow.
module tb_meter_kwh;
  import meter_pkg::*;
  localparam longint unsigned UNIT = 64'd36_000_000_000;
  localparam longint unsigned P    = 31 * 1500;
  logic clk = 0, rst = 1;
  logic [4:0]  voltage_in;
  logic [15:0] current_in;
  logic        clk_100hz, tick;
  logic [15:0] power;
  logic [31:0] power_tot;
  logic [15:0] clock_tot;
  logic [23:0] units, cost, month_units, month_bill;
  logic [31:0] units_bcd, cost_bcd;
  logic [6:0]  display_unit_seg, display_bill_seg;
  logic [7:0]  display_unit_sel, display_bill_sel;
  logic [5:0][6:0] clock_seg;
  logic [5:0][3:0] clock_digits;
  logic        unit_pulse, month_end, month_indicator;
  logic [4:0]  day_count;
  int checks = 0, failures = 0, n_runs = 0;
  longint unsigned energy = 0;

  energy_meter_top #(.DIV(2)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #40ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Sum of every finished run, and the unit count expected from it.
  always @(negedge clk) begin
    if (!rst && dut.run_valid) begin
      n_runs++;
      energy += power_tot;
    end
  end

  initial begin
    voltage_in = 31;
    current_in = 15000;
    repeat (3) @(posedge clk);
    #1;
    rst = 0;
    // Runs of 65535 full-scale samples until just below 1 kWh.
    wait (energy + 65535 * P >= UNIT);
    repeat (20) @(posedge clk);
    #1;
    checks++;
    if (units != 0) begin failures++; $display("FAIL unit before 1 kWh (energy %0d)", energy); end
    // The next run crosses 1 kWh.
    wait (energy >= UNIT);
    repeat (20) @(posedge clk);
    #1;
    checks++;
    if (units != 1 || dut.u_energy_store.residue != 48'(energy - UNIT)) begin
      failures++;
      $display("FAIL units %0d residue %0d after %0d LSB", units, dut.u_energy_store.residue, energy);
    end
    checks++;
    if (cost != 1) begin failures++; $display("FAIL cost %0d", cost); end
    repeat (60) @(posedge clk iff tick);
    #1;
    checks++;
    if (units_bcd != 32'h0000_0001) begin failures++; $display("FAIL reading %h", units_bcd); end
    $display("runs %0d, energy %0d LSB, units %0d", n_runs, energy, units);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
