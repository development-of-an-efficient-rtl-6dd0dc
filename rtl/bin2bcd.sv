// bin2bcd: 24-bit binary to eight BCD digits, shift and add-3.
//
// A conversion starts on an enabled cycle with start high while the block
// is idle: the binary value is loaded into a shift register and the BCD
// digits are cleared. Each following enabled cycle does one step: every BCD
// digit of 5 or more gets 3 added, then digits and binary shift left
// together by one bit (a multiply by two with decimal correction). After 24
// steps the eight digits are written to bcd and done is high for one
// enabled cycle (it holds until the next enable). A conversion therefore
// takes 25 enabled cycles from start to done; bcd keeps the previous result
// until then. The algorithm and the 24-in/32-out widths follow the
// published design; the serial one-bit-per-cycle form is this design's.
module bin2bcd
  import meter_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              en,
  input  logic              start,
  input  logic [UNIT_W-1:0] bin,
  output logic [BCD_W-1:0]  bcd,
  output logic              done,
  output logic              busy
);
  logic [UNIT_W-1:0]         shreg;
  logic [BCD_W-1:0]          work;
  logic [BCD_W-1:0]          adjusted;
  logic [BCD_W+UNIT_W-1:0]   shifted;
  logic [$clog2(UNIT_W)-1:0] step;

  always_comb begin
    for (int d = 0; d < BCD_DIGITS; d++) begin
      adjusted[4*d +: 4] = (work[4*d +: 4] >= 4'd5) ? work[4*d +: 4] + 4'd3 : work[4*d +: 4];
    end
    shifted = {adjusted, shreg} << 1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg <= '0;
      work  <= '0;
      step  <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
      bcd   <= '0;
    end else if (en) begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          shreg <= bin;
          work  <= '0;
          step  <= '0;
          busy  <= 1'b1;
        end
      end else begin
        shreg <= shifted[UNIT_W-1:0];
        work  <= shifted[BCD_W+UNIT_W-1:UNIT_W];
        step  <= step + 1'b1;
        if (step == ($clog2(UNIT_W))'(UNIT_W - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          bcd  <= shifted[BCD_W+UNIT_W-1:UNIT_W];
        end
      end
    end
  end
endmodule
