// tb_energy_meter_top: end-to-end run of the meter at reduced sizes.
//
// DIV = 4 system cycles per sample, one sample per second, a one-day month,
// a unit of 200000 energy LSBs and a tariff of 3, so that every mechanism
// happens within a short simulation. The test:
//   1. drives runs of random voltage/current samples (and the published
//      sequence 15000, 4291, 209, 832 mA at 5 V), checking each finished
//      run's total against the samples that made it;
//   2. holds one power long enough to fill the run-length counter;
//   3. drops to zero power, which closes the last run, and checks the unit
//      count against the energy of every sample driven (sum of v x i/10);
//   4. waits for the month end and checks the latched bill;
//   5. checks cost, both BCD readings, one full scan of both displays and
//      the clock digits against values worked out here.
// It counts how often each mechanism happened and fails any that never did.
module tb_energy_meter_top;
  import meter_pkg::*;
  localparam int unsigned     DIV    = 4;
  localparam int unsigned     ST     = 1;
  localparam int unsigned     DPM    = 1;
  localparam longint unsigned UNIT   = 200000;
  localparam int unsigned     TARIFF = 3;

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
  logic [0:0]  day_count;

  int checks = 0, failures = 0;
  // Mechanism counters.
  int n_ticks = 0, n_runs = 0, n_full_runs = 0, n_units = 0, n_conv = 0, n_month_end = 0;
  int n_led = 0, n_scan_wrap = 0, n_first_start = 0;

  // Reference: energy of every sample driven before the final zero run.
  longint unsigned ref_energy = 0;
  bit accounting = 1;
  // Reference samples in order, to check each run's total.
  int unsigned samp_q[$];

  logic [6:0] code [10] = '{7'h7E, 7'h30, 7'h6D, 7'h79, 7'h33, 7'h5B, 7'h5F, 7'h70, 7'h7F, 7'h7B};

  energy_meter_top #(
    .DIV(DIV), .SEC_TICKS(ST), .DAYS_PER_MONTH(DPM), .UNIT_ENERGY(UNIT), .TARIFF(TARIFF)
  ) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned sample_power(input int unsigned v, input int unsigned ma);
    int unsigned i = ma / 10;
    if (i > 2047) i = 2047;
    return v * i;
  endfunction

  function automatic logic [31:0] to_bcd(input int unsigned v);
    logic [31:0] r = '0;
    for (int d = 0; d < 8; d++) begin
      r[4*d +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

  // The inputs only change just after a rising edge, so at the falling edge
  // before a sampling edge they hold the values that edge takes.
  always @(negedge clk) begin
    if (!rst && tick) begin
      automatic int unsigned p = sample_power(voltage_in, current_in);
      n_ticks++;
      samp_q.push_back(p);
      if (accounting) ref_energy += p;
    end
  end

  // Each finished run must be the next run of equal samples in samp_q.
  // The first sample after reset sees the pipeline's reset value, 0.
  bit first_run = 1;
  always @(negedge clk) begin
    if (!rst && dut.run_valid) begin
      automatic int unsigned t = 0;
      automatic longint unsigned tot = 0;
      n_runs++;
      if (clock_tot == 16'hFFFF) n_full_runs++;
      if (first_run) begin
        first_run = 0;
        // The pipeline register is 0 before the first sample arrives, so the
        // first run is that value plus the zero samples driven after reset.
        while (t + 1 < clock_tot && samp_q.size() > 0) begin
          tot += samp_q.pop_front();
          t++;
        end
        checks++;
        if (dut.run_power != 0 || tot != 0 || power_tot != 0) begin
          failures++;
          $display("FAIL first run not the reset value and zero samples");
        end
      end else begin
        while (t < clock_tot && samp_q.size() > 0) begin
          tot += samp_q.pop_front();
          t++;
        end
        checks++;
        if (t != clock_tot || power_tot != 32'(tot) || 64'(power_tot) != 64'(dut.run_power) * t) begin
          failures++;
          $display("FAIL run total %0d over %0d samples, expected %0d over %0d", power_tot, clock_tot, tot, t);
        end
      end
    end
    if (!rst && unit_pulse) n_units++;
    if (!rst && dut.unit_done && tick) n_conv++;
    if (!rst && month_end) n_month_end++;
    if (!rst && month_indicator && tick) n_led++;
    if (!rst && display_unit_sel[7] && tick) n_scan_wrap++;
    if (!rst && dut.unit_status && dut.u_bin2bcd_energy.busy == 0 && tick && n_ticks < 2) n_first_start++;
  end

  task automatic wait_ticks(input int n);
    repeat (n) begin
      @(posedge clk iff tick);
    end
    #1;
  endtask

  task automatic drive(input int unsigned v, input int unsigned ma, input int n);
    voltage_in = 5'(v);
    current_in = 16'(ma);
    wait_ticks(n);
  endtask

  initial begin
    int unsigned month_units_seen;
    voltage_in = 0;
    current_in = 0;
    repeat (3) @(posedge clk);
    #1;
    rst = 0;
    wait_ticks(2);
    // Published sequence at 5 V.
    drive(5, 15000, 3);
    drive(5, 4291, 5);
    drive(5, 209, 6);
    drive(5, 832, 4);
    // Random runs.
    repeat (150) drive($urandom_range(0, 31), $urandom_range(0, 21000), $urandom_range(1, 25));
    // Fill the 16-bit run-length counter.
    drive(31, 15000, 65540);
    drive(5, 15000, 10);
    // Zero power from here on: the last run closes, no more energy.
    accounting = 0;
    drive(0, 0, 5);
    // A long run can hold many units; they are taken one per system cycle.
    wait_ticks(5000);
    checks++;
    if (64'(units) != ref_energy / UNIT) begin
      failures++;
      $display("FAIL units %0d, expected %0d (energy %0d)", units, ref_energy / UNIT, ref_energy);
    end
    checks++;
    if (cost != 24'(units * TARIFF)) begin failures++; $display("FAIL cost %0d", cost); end
    // Month end comes after 86400 samples (one day, one sample per second).
    while (n_month_end == 0 && n_ticks < 200000) wait_ticks(1);
    month_units_seen = month_units;
    checks++;
    if (month_units != units || month_bill != 24'(units * TARIFF)) begin
      failures++;
      $display("FAIL month bill: %0d units %0d charge, expected %0d %0d", month_units, month_bill,
               units, units * TARIFF);
    end
    // Let both converters finish with the final values, then scan.
    wait_ticks(60);
    checks++;
    if (units_bcd != to_bcd(units) || cost_bcd != to_bcd(cost)) begin
      failures++;
      $display("FAIL BCD %h %h for %0d %0d", units_bcd, cost_bcd, units, cost);
    end
    for (int s = 0; s < 16; s++) begin
      wait_ticks(1);
      for (int d = 0; d < 8; d++) begin
        if (display_unit_sel[d]) begin
          checks++;
          if (display_unit_seg != code[units_bcd[4*d +: 4]] || display_bill_sel != display_unit_sel ||
              display_bill_seg != code[cost_bcd[4*d +: 4]]) begin
            failures++;
            $display("FAIL display digit %0d", d);
          end
        end
      end
    end
    // Clock: n_ticks samples have passed; the clock counts one second each.
    begin
      automatic int unsigned tod = (n_ticks / ST) % 86400;
      automatic logic [5:0][3:0] e;
      e[0] = 4'(tod % 10);          e[1] = 4'((tod / 10) % 6);
      e[2] = 4'((tod / 60) % 10);   e[3] = 4'((tod / 600) % 6);
      e[4] = 4'((tod / 3600) % 10); e[5] = 4'(tod / 36000);
      checks++;
      if (clock_digits != e) begin
        failures++;
        $display("FAIL clock %h, expected %h after %0d samples", clock_digits, e, n_ticks);
      end
    end
    // Every mechanism must have happened.
    checks++; if (n_runs < 100)        begin failures++; $display("FAIL runs %0d", n_runs); end
    checks++; if (n_full_runs == 0)    begin failures++; $display("FAIL counter never filled"); end
    checks++; if (n_units < 2)         begin failures++; $display("FAIL units %0d", n_units); end
    checks++; if (n_conv < 3)          begin failures++; $display("FAIL conversions %0d", n_conv); end
    checks++; if (n_month_end != 1)    begin failures++; $display("FAIL month ends %0d", n_month_end); end
    checks++; if (n_led == 0)          begin failures++; $display("FAIL month LED never lit"); end
    checks++; if (n_scan_wrap == 0)    begin failures++; $display("FAIL display never scanned"); end
    checks++; if (n_first_start != 1)  begin failures++; $display("FAIL no start after reset"); end
    $display("samples %0d runs %0d full-counter runs %0d units %0d conversions %0d month ends %0d bill %0d",
             n_ticks, n_runs, n_full_runs, n_units, n_conv, n_month_end, month_units_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
