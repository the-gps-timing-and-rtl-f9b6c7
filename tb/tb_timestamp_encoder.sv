// tb_timestamp_encoder: self-checking test of the timestamp pulse encoder,
// with 4 clocks per microsecond. A reference clock in the testbench counts
// microseconds from 12.345600 s and drives the BCD time and tick. Every
// pulse train is decoded independently by measuring each channel's pulse
// width (1 us -> 0, 2 us -> 1) and compared with the expected word: the
// time ss:mmm:uu at the start and the error code. Checked: the example
// time 12.34567 s with no errors (word 0x12345670), the 10 us and 20 us
// spacing, that all channels rise together, the enable, and error bits.
module tb_timestamp_encoder;
  import gtc_pkg::*;
  localparam int CPU = 4;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic enable = 1, interval_20us = 0, tick = 0;
  bcd_time_t now;
  ts_err_t err = '0;
  logic [31:0] ts_out, word;
  logic sent;
  int checks = 0, failures = 0;
  longint us_total = 12_345_600;  // microseconds since the minute
  int presc = 0;
  int cyc = 0;

  timestamp_encoder #(.CLK_PER_US(CPU)) dut (.clk, .rst, .enable, .interval_20us, .now, .tick,
                                             .err, .ts_out, .word, .sent);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bcd_time_t to_bcd(longint u);
    bcd_time_t t;
    longint v = u % 60_000_000;
    t.us1 = 4'(v % 10); v /= 10; t.us10 = 4'(v % 10); v /= 10; t.us100 = 4'(v % 10); v /= 10;
    t.ms1 = 4'(v % 10); v /= 10; t.ms10 = 4'(v % 10); v /= 10; t.ms100 = 4'(v % 10); v /= 10;
    t.s1 = 4'(v % 10); v /= 10; t.s10 = 4'(v % 10);
    return t;
  endfunction

  // reference clock: tick on the first cycle of each new microsecond
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst) begin
      if (presc == CPU - 1) begin
        presc <= 0;
        us_total <= us_total + 1;
        now <= to_bcd(us_total + 1);
        tick <= 1;
      end else begin
        presc <= presc + 1;
        tick <= 0;
      end
    end else now <= to_bcd(us_total);
  end

  // decoder: widths of each channel's pulse
  int width [32];
  int rise_cyc = -1, last_rise = -1, n_trains = 0, spacing = 0;
  bcd_time_t t_at_start;
  logic [31:0] prev, exp_word, got;
  ts_err_t err_at_start;
  int n_example = 0;
  always @(posedge clk) begin
    prev <= ts_out;
    if (!rst) begin
      if (ts_out != 0 && prev == 0) begin
        check(ts_out == 32'hFFFF_FFFF, "all channels rise together");
        spacing = (last_rise < 0) ? 0 : cyc - last_rise;
        last_rise = cyc;
        t_at_start = now;       // time is still the value at the start tick
        err_at_start = err;
        for (int i = 0; i < 32; i++) width[i] = 0;
      end
      for (int i = 0; i < 32; i++) if (ts_out[i]) width[i]++;
      if (ts_out == 0 && prev != 0) begin
        for (int i = 0; i < 32; i++) begin
          got[i] = (width[i] == 2 * CPU);
          if (width[i] != CPU && width[i] != 2 * CPU)
            check(0, $sformatf("channel %0d width %0d", i, width[i]));
        end
        exp_word = {t_at_start[31:4], err_at_start};
        check(got == exp_word, $sformatf("decoded %h expected %h", got, exp_word));
        check(t_at_start.us1 == 0, "sent when the microsecond digit is 0");
        if (got == 32'h1234_5670) n_example++;
        if (spacing != 0)
          check(spacing == (interval_20us ? 20 : 10) * CPU, $sformatf("spacing %0d", spacing));
        n_trains++;
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n0;
    repeat (3) @(posedge clk);
    rst = 0;
    wait (n_trains == 10);
    check(n_example == 1, "example 12.34567 s encoded as 0x12345670");
    // 20 us interval
    @(negedge clk) interval_20us = 1;
    last_rise = -1;
    n0 = n_trains;
    wait (n_trains == n0 + 6);
    // errors 1 and 4
    @(negedge clk) err = '{nmea_err: 1, clk_mismatch: 1, default: 0};
    n0 = n_trains;
    wait (n_trains == n0 + 3);
    // disabled: no pulses
    @(negedge clk) enable = 0;
    repeat (4 * CPU) @(posedge clk);
    n0 = n_trains;
    repeat (100 * CPU) @(posedge clk);
    check(n_trains == n0 && ts_out == 0, "no pulses while disabled");
    check(n_trains >= 19, "trains seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
