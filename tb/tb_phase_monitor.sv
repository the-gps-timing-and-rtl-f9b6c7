// tb_phase_monitor: self-checking test of the 1PPS and 10 MHz phase
// monitor (40 clocks per microsecond, 10 MHz reference every 4 clocks).
// 1PPS edges are placed at chosen phases: a steady phase and a 2-clock
// (50 ns) shift give no error, a 3-clock shift raises the 1PPS flag, and
// the measured phase and deviation are compared with the placement. A
// slipped 10 MHz edge raises the lock flag for the following second only.
module tb_phase_monitor;
  localparam int CPU = 40;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic pps_edge = 0, rephase = 0, ref10 = 0;
  logic [5:0] pps_phase;
  logic signed [6:0] pps_dev;
  logic pps_phase_err, lock_err;
  int checks = 0, failures = 0;
  int cyc = 0;
  bit slip = 0;

  phase_monitor #(.CLK_PER_US(CPU)) dut (.clk, .rst, .pps_edge, .rephase, .ref10,
                                         .pps_phase, .pps_dev, .pps_phase_err, .lock_err);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (phase %0d dev %0d)", what, pps_phase, pps_dev); end
  endtask

  // 10 MHz reference: high for 2 clocks, low for 2; one edge can be delayed
  int rc = 0;
  always @(negedge clk) begin
    cyc = cyc + 1;
    if (slip) begin rc = 0; ref10 = 0; end
    else begin
      ref10 = (rc < 2);
      rc = (rc + 1) % 4;
    end
  end

  // pulse pps_edge for one clock when the monitor's counter equals ph
  task automatic pps_at(int ph);
    repeat (3 * CPU) @(posedge clk);
    while (dut.ph != 6'((ph + CPU - 1) % CPU)) @(posedge clk);
    pps_edge <= 1;
    @(posedge clk) pps_edge <= 0;
    @(negedge clk);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    pps_at(10);
    check(pps_phase == 10 && pps_dev == 0 && !pps_phase_err, "reference phase taken");
    check(!lock_err, "10 MHz in lock");
    pps_at(10);
    check(pps_dev == 0 && !pps_phase_err, "steady phase");
    pps_at(12);
    check(pps_phase == 12 && pps_dev == 2 && !pps_phase_err, "+50 ns tolerated");
    pps_at(8);
    check(pps_dev == -2 && !pps_phase_err, "-50 ns tolerated");
    pps_at(13);
    check(pps_dev == 3 && pps_phase_err, "+75 ns flagged");
    pps_at(38);
    check(pps_dev == -12 && pps_phase_err, "wrap-around deviation");
    // rephase: new reference
    @(negedge clk) rephase = 1;
    @(negedge clk) rephase = 0;
    pps_at(38);
    check(pps_dev == 0 && !pps_phase_err, "reference reset by rephase");
    // slip one 10 MHz edge
    @(posedge ref10);
    slip = 1;
    repeat (3) @(negedge clk);
    slip = 0;
    pps_at(38);
    check(lock_err, "10 MHz slip flagged");
    pps_at(38);
    check(!lock_err, "flag cleared after a clean second");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
