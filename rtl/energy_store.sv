// energy_store: accumulates energy and counts billing units of 1 kWh.
//
// Each energy value from energy_calc is added to a 48-bit accumulator.
// Whenever the accumulator holds at least UNIT_ENERGY (one kWh in energy
// LSBs) that amount is taken off, the 24-bit unit counter goes up by one
// and unit_pulse is high for one system cycle. Only one unit is taken per
// cycle; if a value ever holds more than one unit the rest is taken on the
// following cycles. The default UNIT_ENERGY is 3.6e10: 1 kWh = 3.6e6 J
// divided by the 0.1 mJ energy LSB (see energy_calc).
// Accumulating until 1 kWh and counting units is the published function;
// the accumulator width, the unit value in LSBs and the one-unit-per-cycle
// drain are this design's choices. Reset clears everything.
module energy_store
  import meter_pkg::*;
#(
  parameter longint unsigned UNIT_ENERGY = 64'd36_000_000_000
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              energy_valid,
  input  logic [E_W-1:0]    energy,
  output logic [UNIT_W-1:0] units,
  output logic              unit_pulse,
  output logic [47:0]       residue
);
  localparam logic [47:0] UNIT = 48'(UNIT_ENERGY);

  logic [47:0] sum;

  always_comb sum = residue + (energy_valid ? 48'(energy) : 48'd0);

  always_ff @(posedge clk) begin
    if (rst) begin
      residue    <= '0;
      units      <= '0;
      unit_pulse <= 1'b0;
    end else if (sum >= UNIT) begin
      residue    <= sum - UNIT;
      units      <= units + 1'b1;
      unit_pulse <= 1'b1;
    end else begin
      residue    <= sum;
      unit_pulse <= 1'b0;
    end
  end

  initial assert (UNIT_ENERGY > 0) else $error("energy_store: UNIT_ENERGY must be positive");
endmodule
