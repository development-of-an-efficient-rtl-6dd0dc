// tb_display: loads BCD values and follows the scan for several rounds;
// every enabled cycle the registered segment pattern must be the one of the
// digit the one-hot select points at, and the select must step 0,1,..,7,0.
module tb_display;
  logic        clk = 0, rst = 1, en = 0;
  logic [31:0] bcd;
  logic [6:0]  seg;
  logic [7:0]  digit_sel;
  int checks = 0, failures = 0;
  // Segment codes, a in bit 6, for 0-9.
  logic [6:0] code [10] = '{7'h7E, 7'h30, 7'h6D, 7'h79, 7'h33, 7'h5B, 7'h5F, 7'h70, 7'h7F, 7'h7B};

  display dut (.clk, .rst, .en, .bcd, .seg, .digit_sel);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expect_idx = 0;
    bcd = 32'h0000_0150;
    repeat (2) @(posedge clk);
    #1;
    rst = 0;
    #1;
    checks++;
    if (digit_sel != 0) begin failures++; $display("FAIL select lit before scan"); end
    for (int v = 0; v < 40; v++) begin
      if (v > 0) for (int d = 0; d < 8; d++) bcd[4*d +: 4] = 4'($urandom_range(0, 9));
      for (int s = 0; s < 8 * 3; s++) begin
        en = 1;
        @(posedge clk); #1;
        en = 0;
        checks++;
        if (digit_sel != 8'(1 << expect_idx) || seg != code[bcd[4*expect_idx +: 4]]) begin
          failures++;
          $display("FAIL step %0d: sel=%b seg=%h, expected digit %0d = %h", s, digit_sel, seg,
                   expect_idx, code[bcd[4*expect_idx +: 4]]);
        end
        expect_idx = (expect_idx + 1) % 8;
        // No change without enable.
        @(posedge clk); #1;
        checks++;
        if (digit_sel != 8'(1 << ((expect_idx + 7) % 8))) begin
          failures++;
          $display("FAIL scan moved without enable");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
