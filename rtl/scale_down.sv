// scale_down: maps the current sample (0..15000 mA) onto 11 bits.
//
// Combinational. The current is divided by 10, so one output step is
// 10 mA and full scale, 15000 mA, becomes 1500, which fits 11 bits.
// Anything above 20470 mA saturates at 2047. Being combinational, it keeps
// the scaled current aligned with the voltage sample that power_calc
// registers on the same enable.
// The 11-bit output is the published interface; the divide-by-10 is read
// off the published simulation numbers (15000 mA at 5 V giving 7500 per
// sample); the saturation and the combinational form are this design's.
module scale_down
  import meter_pkg::*;
(
  input  logic [IRAW_W-1:0] current_ma,
  output logic [I_W-1:0]    current_scaled
);
  localparam logic [IRAW_W-1:0] I_SAT = IRAW_W'((1 << I_W) - 1);

  logic [IRAW_W-1:0] quotient;

  always_comb begin
    quotient       = current_ma / IRAW_W'(I_DIVISOR);
    current_scaled = (quotient > I_SAT) ? I_SAT[I_W-1:0] : quotient[I_W-1:0];
  end
endmodule
