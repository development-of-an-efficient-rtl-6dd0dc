// clk_div: divides the system clock down to the meter's 100 Hz sample rate.
//
// An 18-bit counter runs from 0 to DIV-1 (DIV = 200000 turns 20 MHz into
// 100 Hz). The square-wave output clk_out is low for the first half of each
// period and high for the second half, so it flips a bit each time the
// counter reaches one of its two end values. Besides the square wave the
// block gives tick, a one-system-cycle pulse on the last cycle of every
// period; the rest of the meter runs on the system clock and uses tick as
// its clock enable, which keeps the whole design on one clock.
// The divisor and the 18-bit counter follow the published design; the
// 50 % duty split and the tick output are this design's choices.
// Reset is synchronous and active high; after reset both outputs are 0.
module clk_div #(
  parameter int unsigned DIV = 200000
) (
  input  logic clk,
  input  logic rst,
  output logic clk_out,
  output logic tick
);
  localparam int unsigned CW = (DIV > 2) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt     <= '0;
      clk_out <= 1'b0;
      tick    <= 1'b0;
    end else begin
      tick <= 1'b0;
      if (cnt == CW'(DIV - 1)) begin
        cnt     <= '0;
        clk_out <= 1'b0;
        tick    <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
        if (cnt == CW'(DIV / 2 - 1)) clk_out <= 1'b1;
      end
    end
  end

  initial assert (DIV >= 2) else $error("clk_div: DIV must be at least 2");
endmodule
