// status_check: keeps the binary-to-BCD converter running.
//
// Watches the converter's done signal and answers with status = 1 for one
// enabled cycle once a conversion has completed, 0 otherwise; status is
// wired back to the converter's start input, so every finished conversion
// starts the next one and the displayed value follows its binary source.
// Reset sets status to 1, so on the first enabled cycle after reset status
// is 1 for exactly that cycle and starts the first conversion.
// The behaviour is the published one; the registered form, one enabled
// cycle after done, is this design's choice. With bin2bcd this gives one
// conversion every 26 enabled cycles.
module status_check (
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  logic conv_done,
  output logic status
);
  always_ff @(posedge clk) begin
    if (rst) status <= 1'b1;
    else if (en) status <= conv_done;
  end
endmodule
