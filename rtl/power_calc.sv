// power_calc: one power sample, P = v x i.
//
// Multiplies the 5-bit voltage sample by the 11-bit scaled current and
// registers the 16-bit product when en is high (latency one enabled cycle).
// 31 x 2047 = 63457, so the product never overflows 16 bits. Widths follow
// the published design; registering the product is this design's choice.
module power_calc
  import meter_pkg::*;
(
  input  logic           clk,
  input  logic           rst,
  input  logic           en,
  input  logic [V_W-1:0] voltage,
  input  logic [I_W-1:0] current,
  output logic [P_W-1:0] power
);
  always_ff @(posedge clk) begin
    if (rst) power <= '0;
    else if (en) power <= P_W'(voltage) * P_W'(current);
  end
endmodule
