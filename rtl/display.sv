// display: scans eight BCD digits onto one set of 7-segment lines.
//
// A 3-bit digit counter advances on every enabled cycle. Each step the
// digit it points at is decoded (a in bit 6, lit = 1) and registered on seg,
// together with a one-hot digit_sel (bit k high lights digit k, digit 0
// being the least significant). Scanned fast enough, all eight digits seem
// lit at once. seg and digit_sel change together, one system cycle after
// the enable; the scan starts at digit 0 after reset.
// Multiplexing eight digits on one set of driver lines is the published
// design; the scan order and the active-high select are this design's.
module display
  import meter_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  en,
  input  logic [BCD_W-1:0]      bcd,
  output logic [SEG_W-1:0]      seg,
  output logic [BCD_DIGITS-1:0] digit_sel
);
  logic [$clog2(BCD_DIGITS)-1:0] idx;
  logic [SEG_W-1:0]              seg_d;

  seven_seg_decoder #(.GFEDCBA_ORDER(1'b0), .ACTIVE_LOW(1'b0)) u_dec (
    .digit (bcd[4*idx +: 4]),
    .seg   (seg_d)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      idx       <= '0;
      seg       <= '0;
      digit_sel <= '0;
    end else if (en) begin
      seg       <= seg_d;
      digit_sel <= BCD_DIGITS'(1) << idx;
      idx       <= idx + 1'b1;
    end
  end

  a_one_digit : assert property (@(posedge clk) disable iff (rst)
    digit_sel == '0 || $onehot(digit_sel));
endmodule
