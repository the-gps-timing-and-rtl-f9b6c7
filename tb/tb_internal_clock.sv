// tb_internal_clock: self-checking test of the GPS-disciplined BCD clock,
// run with 2 clocks per microsecond (1 s = 2,000,000 clocks). A model of
// the receiver sends the time of the current second during each second
// and raises 1PPS at each second boundary. Checked: first synchronization
// by overwrite, the BCD count against a reference computed from elapsed
// clocks, no overwrite when the clock agrees (also with a 1-clock early
// 1PPS), overwrite on a wrong GPS time, no overwrite with a bad fix or an
// NMEA error, the four error bits, the 1PPS time-out, and the minute
// rollover 59.999999 -> 00.000000.
module tb_internal_clock;
  import gtc_pkg::*;
  localparam int CPU = 2;
  localparam int SEC = CPU * 1_000_000;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic pps = 0, time_strobe = 0, nmea_err = 0;
  bcd_t ss10 = 0, ss1 = 0;
  logic [1:0] fix = 3;
  bcd_time_t now;
  logic tick, pps_edge, synced, overwrite;
  logic prescale;
  ts_err_t err;
  int checks = 0, failures = 0, n_overwrite = 0;

  internal_clock #(.CLK_PER_US(CPU), .PPS_TIMEOUT(3 * SEC)) dut (
    .clk, .rst, .pps, .time_strobe, .gps_ss10(ss10), .gps_ss1(ss1), .gps_fix(fix), .nmea_err,
    .now, .tick, .prescale, .err, .pps_edge, .synced, .overwrite
  );
  always @(posedge clk) if (!rst) n_overwrite += int'(overwrite);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (now=%h err=%b)", what, now, err); end
  endtask

  // expected BCD time from seconds and microseconds
  function automatic bcd_time_t expect_time(int sec, int us);
    bcd_time_t t;
    sec = sec % 60;
    t.s10 = 4'(sec / 10); t.s1 = 4'(sec % 10);
    t.ms100 = 4'(us / 100000); t.ms10 = 4'((us / 10000) % 10); t.ms1 = 4'((us / 1000) % 10);
    t.us100 = 4'((us / 100) % 10); t.us10 = 4'((us / 10) % 10); t.us1 = 4'(us % 10);
    return t;
  endfunction

  // One receiver second: optional time string for second s (sent 1000
  // clocks after the last 1PPS), optional NMEA error, then 1PPS after
  // len clocks in total.
  task automatic gps_second(int s, bit send_time, bit send_err, int len);
    repeat (1000) @(posedge clk);
    if (send_time) begin
      ss10 <= 4'(s / 10); ss1 <= 4'(s % 10); time_strobe <= 1;
      @(posedge clk) time_strobe <= 0;
    end
    if (send_err) begin nmea_err <= 1; @(posedge clk) nmea_err <= 0; end
    repeat (len - 1000 - int'(send_time) - int'(send_err)) @(posedge clk);
    pps <= 1;         // seen by the clock at the next edge
    @(posedge clk);   // edge detected, clock compared / overwritten
    @(posedge clk);
    @(negedge clk);   // sample away from the clock edge
    pps <= 0;
  endtask

  initial begin
    repeat (30 * SEC) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5) @(posedge clk);
    rst = 0;
    // 1. first synchronization: receiver says second 5 -> 1PPS marks 6
    gps_second(5, 1, 0, 5000);
    check(now == expect_time(6, 0) && n_overwrite == 1 && synced, "first overwrite to 06.000000");
    check(err.clk_mismatch && !err.comm_lost && !err.no_fix && !err.nmea_err, "mismatch flagged at first sync");
    // 2. free running: check at an odd point of the second
    repeat (2 * 123457 - 1) @(posedge clk);
    @(negedge clk);
    check(now == expect_time(6, 123457), "BCD count after 123457 us");
    // the next 1PPS falls exactly one second after the previous one
    gps_second(6, 1, 0, SEC - 2 * 123457 - 1);
    check(n_overwrite == 1 && !err.clk_mismatch, "in step: no overwrite at 07");
    check(now == expect_time(7, 0) || now == expect_time(6, 999999), "time at 1PPS 07");
    // 3. 1PPS one clock early: rounding tolerates it
    gps_second(7, 1, 0, SEC - 3);
    check(n_overwrite == 1 && !err.clk_mismatch, "early 1PPS tolerated");
    // 4. wrong GPS time (receiver jumps to 30): overwrite to 31
    gps_second(30, 1, 0, SEC - 2);
    check(n_overwrite == 2 && err.clk_mismatch && now == expect_time(31, 0), "overwrite to 31.000000");
    // 5. bad fix and a wrong time: flagged, not overwritten
    fix = 1;
    repeat (4) @(posedge clk);
    @(negedge clk);
    check(err.no_fix, "no fix flagged");
    gps_second(40, 1, 0, SEC - 6);
    check(n_overwrite == 2 && err.clk_mismatch && err.no_fix, "no overwrite without fix");
    fix = 3;
    // 6. NMEA error in the second: flagged, not overwritten
    gps_second(45, 1, 1, SEC - 2);
    check(n_overwrite == 2 && err.nmea_err && err.clk_mismatch, "no overwrite after NMEA error");
    // 7. no time string: communication lost
    gps_second(0, 0, 0, SEC - 2);
    check(err.comm_lost && !err.clk_mismatch && !err.nmea_err && n_overwrite == 2, "missing string -> comm lost");
    // 8. good second: back in step (internal clock now reads 35.000000)
    gps_second(34, 1, 0, SEC - 2);
    check(!err.comm_lost && !err.clk_mismatch && n_overwrite == 2 && now == expect_time(35, 0), "recovered at 35");
    // 9. jump near the minute end, then roll over
    gps_second(58, 1, 0, SEC - 2);
    check(now == expect_time(59, 0) && n_overwrite == 3, "set to 59");
    repeat (SEC - 3) @(posedge clk);
    @(negedge clk);
    check(now == expect_time(59, 999999), "59.999999");
    repeat (2) @(posedge clk);
    @(negedge clk);
    check(now == expect_time(0, 0), "minute rollover to 00.000000");
    // 10. 1PPS time-out (no 1PPS for 3 s)
    repeat (3 * SEC + 10) @(posedge clk);
    @(negedge clk);
    check(err.comm_lost, "1PPS time-out -> comm lost");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
