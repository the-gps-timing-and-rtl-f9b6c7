// tb_busy_pulse_gen: self-checking test of the Busy Pulses output with 24
// Almost Full inputs: low while none is set; following the 10 MHz
// reference (in phase) when any single input, or several, are set, after
// the two-flop synchronizer delay.
module tb_busy_pulse_gen;
  logic clk = 0, rst = 1;
  always #12.5 clk = ~clk;
  logic ref10, ref10_next, busy_pulses, busy;
  logic [23:0] af = 0, af_sync;
  int checks = 0, failures = 0;

  ref10_gen u_ref (.clk, .rst, .ref10, .ref10_next);
  busy_pulse_gen #(.N_AF(24)) dut (.clk, .rst, .almost_full(af), .ref10_next, .busy_pulses, .busy, .af_sync);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic hold(logic [23:0] v);
    @(negedge clk) af = v;
    repeat (3) @(negedge clk);   // synchronizer latency
    repeat (12) begin
      @(negedge clk);
      check(busy == (v != 0), $sformatf("busy for %h", v));
      check(busy_pulses == ((v != 0) && ref10), $sformatf("busy pulses for %h", v));
    end
    check(af_sync == v, "synchronized inputs");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    hold(0);
    for (int i = 0; i < 24; i++) hold(24'(1) << i);
    hold(0);
    hold(24'h800801);
    hold(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
