// tb_seven_seg_decoder: checks all 16 codes in both conventions against
// segment lists written out here (which segments a-g each digit lights).
module tb_seven_seg_decoder;
  logic [3:0] digit;
  logic [6:0] seg_read, seg_clock;
  int checks = 0, failures = 0;

  seven_seg_decoder #(.GFEDCBA_ORDER(1'b0), .ACTIVE_LOW(1'b0)) dut_read  (.digit, .seg(seg_read));
  seven_seg_decoder #(.GFEDCBA_ORDER(1'b1), .ACTIVE_LOW(1'b1)) dut_clock (.digit, .seg(seg_clock));

  // Lit segments per digit, as letters.
  function automatic string lit(input int d);
    case (d)
      0: return "abcdef";  1: return "bc";     2: return "abdeg";  3: return "abcdg";
      4: return "bcfg";    5: return "acdfg";  6: return "acdefg"; 7: return "abc";
      8: return "abcdefg"; 9: return "abcdfg"; default: return "";
    endcase
  endfunction

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 16; d++) begin
      logic [6:0] e_read, e_clock;
      string s;
      e_read = '0;
      e_clock = '1;
      s = lit(d);
      for (int k = 0; k < s.len(); k++) begin
        automatic int seg_i = int'(s[k]) - 97;  // 0 = a ... 6 = g
        e_read[6 - seg_i] = 1'b1;      // a in bit 6
        e_clock[seg_i]    = 1'b0;      // a in bit 0, lit = 0
      end
      digit = 4'(d);
      #1;
      checks++;
      if (seg_read != e_read) begin
        failures++;
        $display("FAIL digit %0d: %h expected %h", d, seg_read, e_read);
      end
      checks++;
      if (seg_clock != e_clock) begin
        failures++;
        $display("FAIL clock digit %0d: %h expected %h", d, seg_clock, e_clock);
      end
    end
    // Codes seen on the published traces.
    digit = 0; #1; checks++; if (seg_read != 7'h7E || seg_clock != 7'h40) failures++;
    digit = 1; #1; checks++; if (seg_read != 7'h30 || seg_clock != 7'h79) failures++;
    digit = 5; #1; checks++; if (seg_read != 7'h5B || seg_clock != 7'h12) failures++;
    digit = 9; #1; checks++; if (seg_clock != 7'h10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
