// tb_tdc_cmd_pulse: self-checking test of the CLR / CRST pulse module:
// one request gives exactly one WIDTH-clock pulse starting one clock later;
// nothing happens without a request; a request during a pulse extends it.
module tb_tdc_cmd_pulse;
  localparam int W = 6;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic req = 0, pulse;
  int checks = 0, failures = 0, high = 0, rises = 0;
  logic pulse_d = 0;

  tdc_cmd_pulse #(.WIDTH(W)) dut (.clk, .rst, .req, .pulse);

  always @(posedge clk) if (!rst) begin
    pulse_d <= pulse;
    if (pulse) high++;
    if (pulse && !pulse_d) rises++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (20) @(posedge clk);
    check(high == 0, "idle without request");
    @(negedge clk) req = 1;
    @(negedge clk) req = 0;
    check(pulse, "pulse starts one clock after request");
    repeat (30) @(posedge clk);
    check(high == W && rises == 1, $sformatf("one pulse of %0d clocks, got %0d", W, high));
    high = 0;
    @(negedge clk) req = 1;
    @(negedge clk) req = 0;
    repeat (2) @(negedge clk);
    req = 1;
    @(negedge clk) req = 0;
    repeat (30) @(posedge clk);
    check(high == W + 3 && rises == 2, $sformatf("retriggered pulse %0d clocks", high));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
