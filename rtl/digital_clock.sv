// digital_clock: time of day, day count and the end-of-month indicator.
//
// A prescaler counts SEC_TICKS enabled cycles (100 at the 100 Hz sample
// rate) to make one second. Six cascaded decimal counters then hold seconds
// (0-9), ten seconds (0-5), minutes (0-9), ten minutes (0-5) and the hour
// 00-23 as two digits; each counter steps when the one below it wraps. The
// digits are decoded for six 7-segment displays: digit_seg[0] is the
// seconds digit ... digit_seg[5] the tens of hours, in the active-low
// g-to-a convention of seven_seg_decoder #(1, 1).
// At midnight the day counter goes up. When it reaches DAYS_PER_MONTH (30)
// it restarts from 0, month_end is high for one system cycle (this starts
// the billing of the month) and month_indicator, the end-of-month LED, is
// set and stays on until the next midnight.
// Counters, decoders, day count and the 30-day month follow the published
// design; the 24-hour format, the start at 00:00:00 on reset and how long
// the indicator stays on are this design's choices.
module digital_clock
  import meter_pkg::*;
#(
  parameter int unsigned SEC_TICKS      = 100,
  parameter int unsigned DAYS_PER_MONTH = 30
) (
  input  logic                                 clk,
  input  logic                                 rst,
  input  logic                                 en,
  output logic [CLK_DIGITS-1:0][3:0]           digits,
  output logic [CLK_DIGITS-1:0][SEG_W-1:0]     digit_seg,
  output logic [$clog2(DAYS_PER_MONTH+1)-1:0]  day_count,
  output logic                                 month_end,
  output logic                                 month_indicator
);
  localparam int unsigned PW = (SEC_TICKS > 1) ? $clog2(SEC_TICKS) : 1;
  localparam int unsigned DW = $clog2(DAYS_PER_MONTH + 1);

  logic [PW-1:0] presc;
  logic          sec_step;
  logic [3:0]    s_u, s_t, m_u, m_t, h_u, h_t;
  logic          wrap_su, wrap_st, wrap_mu, wrap_mt, wrap_day;

  always_comb begin
    sec_step = en && (presc == PW'(SEC_TICKS - 1));
    wrap_su  = sec_step && s_u == 4'd9;
    wrap_st  = wrap_su  && s_t == 4'd5;
    wrap_mu  = wrap_st  && m_u == 4'd9;
    wrap_mt  = wrap_mu  && m_t == 4'd5;
    wrap_day = wrap_mt  && h_t == 4'd2 && h_u == 4'd3;
    digits   = {h_t, h_u, m_t, m_u, s_t, s_u};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      presc <= '0;
      {s_u, s_t, m_u, m_t, h_u, h_t} <= '0;
      day_count       <= '0;
      month_end       <= 1'b0;
      month_indicator <= 1'b0;
    end else begin
      month_end <= 1'b0;
      if (en) presc <= (presc == PW'(SEC_TICKS - 1)) ? '0 : presc + 1'b1;
      if (sec_step) s_u <= wrap_su ? 4'd0 : s_u + 4'd1;
      if (wrap_su)  s_t <= wrap_st ? 4'd0 : s_t + 4'd1;
      if (wrap_st)  m_u <= wrap_mu ? 4'd0 : m_u + 4'd1;
      if (wrap_mu)  m_t <= wrap_mt ? 4'd0 : m_t + 4'd1;
      if (wrap_mt) begin
        if (wrap_day) begin
          h_u <= 4'd0;
          h_t <= 4'd0;
        end else if (h_u == 4'd9) begin
          h_u <= 4'd0;
          h_t <= h_t + 4'd1;
        end else begin
          h_u <= h_u + 4'd1;
        end
      end
      if (wrap_day) begin
        if (day_count == DW'(DAYS_PER_MONTH - 1)) begin
          day_count       <= '0;
          month_end       <= 1'b1;
          month_indicator <= 1'b1;
        end else begin
          day_count       <= day_count + 1'b1;
          month_indicator <= 1'b0;
        end
      end
    end
  end

  for (genvar g = 0; g < CLK_DIGITS; g++) begin : g_dec
    seven_seg_decoder #(.GFEDCBA_ORDER(1'b1), .ACTIVE_LOW(1'b1)) u_dec (
      .digit (digits[g]),
      .seg   (digit_seg[g])
    );
  end
endmodule
