// tb_energy_meter_full: the meter at its default sizes (20 MHz clock,
// 200000 cycles per 100 Hz sample, 100 samples per second, 30-day month,
// 1 kWh = 3.6e10 energy LSBs) through one complete measuring cycle:
// it checks that samples come every 200000 system cycles with a 50 % duty
// square wave, drives 15000, 4291, 209 and 832 mA at 5 V for 3, 5, 6 and 4
// samples and checks the finished runs (totals 0x57E4, 0x29E5, 0x0258 over
// 3, 5 and 6 samples), checks that the clock shows 00:00:01 after 100
// samples, and that both readings show all-zero digits (7E) since far less
// than one unit has been used.
module tb_energy_meter_full;
  import meter_pkg::*;
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

  int checks = 0, failures = 0;
  longint unsigned cyc = 0, last_tick = 0, high = 0;
  int n_ticks = 0, n_runs = 0;
  int unsigned exp_tot [3] = '{32'h57E4, 32'h29E5, 32'h0258};
  int unsigned exp_t   [3] = '{3, 5, 6};

  energy_meter_top dut (.*);

  always #25 clk = ~clk;  // 20 MHz

  initial begin
    #2s;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (!rst) begin
      cyc++;
      if (clk_100hz) high++;
      if (tick) begin
        n_ticks++;
        if (n_ticks > 1) begin
          checks++;
          if (cyc - last_tick != 200000 || high != 100000) begin
            failures++;
            $display("FAIL sample period %0d cycles, high %0d", cyc - last_tick, high);
          end
        end
        last_tick = cyc;
        high = 0;
      end
      // Runs after the reset-value run: the three published ones.
      if (dut.run_valid) begin
        if (n_runs >= 1 && n_runs <= 3) begin
          checks++;
          if (power_tot != exp_tot[n_runs-1] || clock_tot != 16'(exp_t[n_runs-1])) begin
            failures++;
            $display("FAIL run %0d: %h over %0d, expected %h over %0d", n_runs, power_tot,
                     clock_tot, exp_tot[n_runs-1], exp_t[n_runs-1]);
          end
        end
        n_runs++;
      end
    end
  end

  task automatic wait_ticks(input int n);
    repeat (n) @(posedge clk iff tick);
    #1;
  endtask

  initial begin
    voltage_in = 5;
    current_in = 0;
    repeat (3) @(posedge clk);
    #1;
    rst = 0;
    // The first sample is taken at the end of the first period.
    wait_ticks(1);
    voltage_in = 5; current_in = 15000;
    // Inputs set after this tick are taken at the next one; the first
    // published run is preceded by the reset-value run.
    wait_ticks(3);
    current_in = 4291; wait_ticks(5);
    current_in = 209;  wait_ticks(6);
    current_in = 832;  wait_ticks(4);
    current_in = 0;    wait_ticks(3);
    checks++;
    if (n_runs < 4) begin failures++; $display("FAIL only %0d runs", n_runs); end
    wait_ticks(100 - n_ticks + 1);
    checks++;
    if (clock_digits != {4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd1}) begin
      failures++;
      $display("FAIL clock %h after %0d samples", clock_digits, n_ticks);
    end
    checks++;
    if (units != 0 || cost != 0 || units_bcd != 0 || cost_bcd != 0) begin
      failures++;
      $display("FAIL readings not zero");
    end
    for (int s = 0; s < 8; s++) begin
      wait_ticks(1);
      checks++;
      if (display_unit_seg != 7'h7E || display_bill_seg != 7'h7E || !$onehot(display_unit_sel)) begin
        failures++;
        $display("FAIL display %h %h %b", display_unit_seg, display_bill_seg, display_unit_sel);
      end
    end
    checks++;
    if (dut.u_energy_store.residue == 0) begin
      failures++;
      $display("FAIL no energy accumulated");
    end
    $display("samples %0d runs %0d energy %0d LSB", n_ticks, n_runs, dut.u_energy_store.residue);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
