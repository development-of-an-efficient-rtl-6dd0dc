// power_store: groups equal power samples into runs of constant power.
//
// On every enabled cycle the incoming power sample is compared with the
// previous one. While they are equal the sample is added to the running
// total and the duration counter goes up by one, so the counter holds the
// number of samples since the power last changed. When the power changes
// the finished run is handed on: run_power (the constant power level),
// power_tot (sum of the run's samples) and clock_tot (its length in samples)
// are registered and run_valid is high for exactly one system cycle. The new
// sample then starts the next run with total = sample and count = 1.
// A run that reaches the largest count the 16-bit counter can hold is
// handed on as if the power had changed, so no count is lost.
// Comparator, adder, counter and register follow the published design;
// the first-sample handling, the counter-full flush and the extra run_power
// output are this design's choices. Reset is synchronous, active high.
module power_store
  import meter_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic            en,
  input  logic [P_W-1:0]  power,
  output logic            run_valid,
  output logic [P_W-1:0]  run_power,
  output logic [PT_W-1:0] power_tot,
  output logic [T_W-1:0]  clock_tot
);
  logic            started;
  logic [P_W-1:0]  prev;
  logic [PT_W-1:0] acc;
  logic [T_W-1:0]  cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      started   <= 1'b0;
      prev      <= '0;
      acc       <= '0;
      cnt       <= '0;
      run_valid <= 1'b0;
      run_power <= '0;
      power_tot <= '0;
      clock_tot <= '0;
    end else begin
      run_valid <= 1'b0;
      if (en) begin
        if (!started) begin
          started <= 1'b1;
          prev    <= power;
          acc     <= PT_W'(power);
          cnt     <= T_W'(1);
        end else if (power == prev && cnt != '1) begin
          acc <= acc + PT_W'(power);
          cnt <= cnt + 1'b1;
        end else begin
          run_valid <= 1'b1;
          run_power <= prev;
          power_tot <= acc;
          clock_tot <= cnt;
          prev      <= power;
          acc       <= PT_W'(power);
          cnt       <= T_W'(1);
        end
      end
    end
  end

  // The total of a run is its constant level times its length.
  a_run_total : assert property (@(posedge clk) disable iff (rst)
    run_valid |-> power_tot == PT_W'(run_power) * PT_W'(clock_tot));
endmodule
