// tb_power_store: feeds runs of equal power samples, with gaps in the
// enable, and checks every finished run (level, total, length) against a
// reference kept here. Includes the published sequence (7500 x3, 2145 x5,
// 100 x6, 415 ...) and one run long enough to fill the 16-bit counter.
module tb_power_store;
  logic        clk = 0, rst = 1, en = 0;
  logic [15:0] power;
  logic        run_valid;
  logic [15:0] run_power;
  logic [31:0] power_tot;
  logic [15:0] clock_tot;
  int checks = 0, failures = 0;

  typedef struct { int unsigned p; longint unsigned tot; int unsigned t; } run_t;
  run_t exp_q[$];
  int unsigned ref_prev, ref_cnt;
  longint unsigned ref_sum;
  bit ref_started = 0;
  int runs_seen = 0, full_flush_seen = 0;

  power_store dut (.clk, .rst, .en, .power, .run_valid, .run_power, .power_tot, .clock_tot);

  always #5 clk = ~clk;

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model of the run grouping.
  task automatic sample(input int unsigned p);
    if (!ref_started) begin
      ref_started = 1; ref_prev = p; ref_sum = p; ref_cnt = 1;
    end else if (p == ref_prev && ref_cnt != 65535) begin
      ref_sum += p; ref_cnt++;
    end else begin
      exp_q.push_back('{ref_prev, ref_sum, ref_cnt});
      ref_prev = p; ref_sum = p; ref_cnt = 1;
    end
    power = 16'(p); en = 1;
    @(posedge clk); #1;
    en = 0;
    if ($urandom_range(0, 3) == 0) begin
      power = 16'($urandom);
      @(posedge clk); #1;
    end
  endtask

  always @(posedge clk) begin
    if (!rst && run_valid) begin
      run_t e;
      runs_seen++;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected run %0d x %0d", run_power, clock_tot);
      end else begin
        e = exp_q.pop_front();
        if (e.t == 65535) full_flush_seen++;
        if (run_power != 16'(e.p) || power_tot != 32'(e.tot) || clock_tot != 16'(e.t)) begin
          failures++;
          $display("FAIL run p=%0d tot=%0d t=%0d, expected p=%0d tot=%0d t=%0d",
                   run_power, power_tot, clock_tot, e.p, e.tot, e.t);
        end
      end
    end
  end

  initial begin
    power = 0;
    repeat (2) @(posedge clk);
    #1;
    rst = 0;
    @(posedge clk); #1;
    repeat (3) sample(7500);
    repeat (5) sample(2145);
    repeat (6) sample(100);
    repeat (4) sample(415);
    for (int r = 0; r < 60; r++) begin
      automatic int unsigned p = $urandom_range(0, 4) == 0 ? 0 : $urandom_range(0, 65535);
      repeat ($urandom_range(1, 12)) sample(p);
    end
    repeat (65537) sample(300);
    sample(301);
    sample(302);
    repeat (3) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d runs never came out", exp_q.size());
    end
    checks++;
    if (full_flush_seen != 1) begin
      failures++;
      $display("FAIL counter-full flush seen %0d times", full_flush_seen);
    end
    // Published values: 3 x 7500 = 0x57E4, 5 x 2145 = 0x29E5, 6 x 100 = 0x0258.
    $display("runs checked: %0d", runs_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
