// tb_energy_store: with a unit of 1000 energy LSBs, adds energy values
// (small, exactly one unit, several units at once) and checks the unit
// count, the residue and the one-cycle unit pulses against a reference.
module tb_energy_store;
  localparam longint unsigned UNIT = 1000;
  logic        clk = 0, rst = 1;
  logic        energy_valid;
  logic [31:0] energy;
  logic [23:0] units;
  logic        unit_pulse;
  logic [47:0] residue;
  int checks = 0, failures = 0;
  longint unsigned ref_total = 0;
  int pulses = 0;

  energy_store #(.UNIT_ENERGY(UNIT)) dut (.clk, .rst, .energy_valid, .energy, .units, .unit_pulse, .residue);

  always #5 clk = ~clk;

  initial begin
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst && unit_pulse) pulses++;

  task automatic add(input int unsigned e);
    energy = 32'(e); energy_valid = 1; ref_total += e;
    @(posedge clk); #1;
    energy_valid = 0;
    // Give the accumulator time to take off every whole unit.
    repeat (int'(e / UNIT) + 1) @(posedge clk);
    #1;
    checks++;
    if (units != 24'(ref_total / UNIT) || residue != 48'(ref_total % UNIT)) begin
      failures++;
      $display("FAIL after +%0d: units=%0d residue=%0d, expected %0d %0d",
               e, units, residue, ref_total / UNIT, ref_total % UNIT);
    end
    checks++;
    if (pulses != int'(ref_total / UNIT)) begin
      failures++;
      $display("FAIL %0d unit pulses, expected %0d", pulses, ref_total / UNIT);
    end
  endtask

  initial begin
    energy_valid = 0; energy = 0;
    repeat (2) @(posedge clk);
    #1;
    rst = 0;
    @(posedge clk); #1;
    add(300); add(300); add(300); add(100); add(999); add(1); add(1000); add(3500);
    repeat (200) add($urandom_range(0, 2500));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
