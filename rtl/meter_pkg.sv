// meter_pkg: widths shared by the blocks of the household energy meter.
//
// The voltage sample is 5 bits, the scaled current 11 bits and their
// product, one power sample, 16 bits; these three widths and the 24-bit
// binary input / 32-bit (eight digit) BCD output of the converter are the
// meter's published numbers. The raw current input width (16 bits, enough
// for 0..15000 mA), the 16-bit duration counter, the 32-bit energy of one
// interval and the 24-bit unit and cost counters are choices of this design.
package meter_pkg;
  localparam int unsigned V_W      = 5;   // voltage sample
  localparam int unsigned IRAW_W   = 16;  // current sample in mA
  localparam int unsigned I_W      = 11;  // scaled current
  localparam int unsigned P_W      = 16;  // one power sample, v x i
  localparam int unsigned T_W      = 16;  // duration of a constant-power run, in samples
  localparam int unsigned PT_W     = P_W + T_W; // accumulated power of a run
  localparam int unsigned E_W      = P_W + T_W; // energy of a run, P x t
  localparam int unsigned UNIT_W   = 24;  // billing units (kWh) and cost
  localparam int unsigned BCD_DIGITS = 8;
  localparam int unsigned BCD_W    = 4 * BCD_DIGITS;
  localparam int unsigned SEG_W    = 7;
  localparam int unsigned CLK_DIGITS = 6; // hh:mm:ss

  // Divisor that maps the 0..15000 mA current range onto I_W bits.
  localparam int unsigned I_DIVISOR  = 10;
endpackage
