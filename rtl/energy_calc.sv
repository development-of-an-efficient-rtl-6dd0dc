// energy_calc: energy of one constant-power run, E = P x t.
//
// When run_valid arrives from power_store the run's power level (16 bits)
// is multiplied by its duration in samples (16 bits) and the 32-bit product
// is registered; energy_valid follows run_valid one system cycle later.
// With the voltage in volts, the current in 10 mA steps and 100 samples per
// second, one energy LSB is 1 V x 10 mA x 10 ms = 0.1 mJ.
// The multiplication is the published function; the widths, the unit
// reading and the one-cycle registered timing are this design's choices.
module energy_calc
  import meter_pkg::*;
(
  input  logic           clk,
  input  logic           rst,
  input  logic           run_valid,
  input  logic [P_W-1:0] run_power,
  input  logic [T_W-1:0] run_time,
  output logic           energy_valid,
  output logic [E_W-1:0] energy
);
  always_ff @(posedge clk) begin
    if (rst) begin
      energy_valid <= 1'b0;
      energy       <= '0;
    end else begin
      energy_valid <= run_valid;
      if (run_valid) energy <= E_W'(run_power) * E_W'(run_time);
    end
  end
endmodule
