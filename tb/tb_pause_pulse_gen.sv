// tb_pause_pulse_gen: self-checking test of the Pause Pulses output driven
// by the 10 MHz reference generator: while paused it equals the reference
// on every clock (in phase), otherwise it stays low.
module tb_pause_pulse_gen;
  logic clk = 0, rst = 1;
  always #12.5 clk = ~clk;
  logic ref10, ref10_next, paused = 0, pause_pulses;
  int checks = 0, failures = 0, n_pulse = 0;

  ref10_gen u_ref (.clk, .rst, .ref10, .ref10_next);
  pause_pulse_gen dut (.clk, .rst, .paused, .ref10_next, .pause_pulses);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (40) begin @(negedge clk); check(!pause_pulses, "low when running"); end
    paused = 1;
    @(negedge clk);
    repeat (80) begin
      @(negedge clk);
      check(pause_pulses == ref10, "in phase with the reference while paused");
      n_pulse += int'(pause_pulses);
    end
    check(n_pulse == 40, "half of the clocks high");
    paused = 0;
    @(negedge clk);
    repeat (40) begin @(negedge clk); check(!pause_pulses, "low again"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
