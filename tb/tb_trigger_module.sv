// tb_trigger_module: self-checking test of the TDC trigger module. In
// periodic mode with the default 40 MHz clock and a period of 1000 clocks
// (40 kHz) the distance between trigger rising edges and the pulse width
// are measured; a period change is followed; pause stops triggers and
// raises paused; external mode fires once per external rising edge after
// the stated latency and ignores edges during a pulse.
module tb_trigger_module;
  import gtc_pkg::*;
  localparam int W = 4;
  logic clk = 0, rst = 1;
  always #12.5 clk = ~clk;   // 40 MHz
  trig_mode_e mode = TRIG_PAUSE;
  logic [31:0] period = 1000;
  logic ext_trig = 0, trg, paused;
  logic [31:0] trig_count;
  int checks = 0, failures = 0;
  int cyc = 0, last_rise = -1, spacing = -1, width = 0, last_width = 0, n_rise = 0;
  logic trg_d = 0;

  trigger_module #(.TRG_WIDTH(W)) dut (.clk, .rst, .mode, .period, .ext_trig, .trg, .paused, .trig_count);

  always @(posedge clk) begin
    cyc++;
    trg_d <= trg;
    if (!rst) begin
      if (trg && !trg_d) begin
        spacing = (last_rise < 0) ? -1 : cyc - last_rise;
        last_rise = cyc;
        n_rise++;
        width = 1;
      end else if (trg) width++;
      if (!trg && trg_d) last_width = width;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n0, c0;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (2000) @(posedge clk);
    check(n_rise == 0 && paused, "no trigger while paused");
    @(negedge clk) mode = TRIG_PERIODIC;
    repeat (5500) @(posedge clk);
    check(n_rise == 5, $sformatf("5 triggers in 5500 clocks, got %0d", n_rise));
    check(spacing == 1000, $sformatf("40 kHz: spacing %0d clocks", spacing));
    check(last_width == W, $sformatf("pulse width %0d", last_width));
    check(!paused, "not paused in periodic mode");
    check(trig_count == 32'(n_rise), "trigger counter");
    @(negedge clk) period = 400;
    repeat (2000) @(posedge clk);
    check(spacing == 400, $sformatf("100 kHz: spacing %0d", spacing));
    @(negedge clk) mode = TRIG_PAUSE;
    n0 = n_rise;
    repeat (3000) @(posedge clk);
    check(n_rise == n0 && paused, "pause stops triggers");
    @(negedge clk) mode = TRIG_EXTERNAL;
    repeat (10) @(posedge clk);
    for (int i = 0; i < 5; i++) begin
      n0 = n_rise;
      @(negedge clk) ext_trig = 1;
      c0 = cyc;
      @(negedge clk) ext_trig = 0;   // second edge comes during the pulse
      @(negedge clk) ext_trig = 1;
      @(negedge clk) ext_trig = 0;
      repeat (20) @(posedge clk);
      check(n_rise == n0 + 1, "one trigger per external edge");
      check(last_rise - c0 <= 2, $sformatf("external latency %0d", last_rise - c0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
