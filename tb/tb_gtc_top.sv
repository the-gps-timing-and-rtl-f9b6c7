// tb_gtc_top: end-to-end test of the GPS Timing and Control system at a
// reduced clock scale (2 clocks per microsecond, 16 clocks per RS232 bit,
// 100-clock trigger period, 100-clock LNE period). A GPS receiver model
// drives 1PPS, the RS232 sentences and the 10 MHz reference; a VME master
// runs the system like the data acquisition would: it waits for the clock
// to lock to GPS, starts the trigger, issues CLR / CRST, sends a receiver
// configuration string and reads back health words. Every mechanism is
// counted; one that never happened counts as a failure.
module tb_gtc_top;
  import gtc_pkg::*;
  localparam int CPU  = 2;
  localparam int SEC  = CPU * 1_000_000;
  localparam int CPB  = 16;
  localparam int N_AF = 24;
  localparam logic [23:0] CKB = 24'h100000, CTB = 24'h200000;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic gps_rxd, gps_txd, pps, ref10_gps;
  vme_in_t vme_i = '{as_n: 1, ds_n: 2'b11, write_n: 1, am: 0, addr: 0, data: 0};
  vme_out_t vme_o;
  logic [31:0] ts_out, ts_word, trig_count;
  logic ts_sent, trg, clr, crst, lne, ref10_out, pause_pulses, busy_pulses, sbc_readout;
  logic ext_trig_in = 0, lne_enable_in = 1;
  logic [N_AF-1:0] almost_full = '0;
  bcd_time_t now;
  ts_err_t err;
  logic [15:0] vme_rdata, rd;
  int vme_timeouts = 0;
  int checks = 0, failures = 0;
  logic compare = 0;

  gps_receiver_model #(.CLK_PER_SEC(SEC), .CLKS_PER_BIT(CPB)) gps (.clk, .rxd(gps_rxd), .pps, .ref10(ref10_gps));

  gtc_top #(.CLK_PER_US(CPU), .CLKS_PER_BIT(CPB), .PPS_TIMEOUT(3 * SEC), .FIFO_DEPTH(16),
            .TRIG_PERIOD(32'd100), .LNE_HALF(50)) dut (
    .clk_40m(clk), .rst, .gps_rxd, .gps_txd, .pps_in(pps), .ref10_in(ref10_gps), .vme_i, .vme_o,
    .ts_out, .ext_trig_in, .lne_enable_in, .almost_full, .trg, .clr, .crst, .lne, .ref10_out,
    .pause_pulses, .busy_pulses, .sbc_readout, .ts_word, .ts_sent, .now, .err, .trig_count);

  ts_checker #(.CLK_PER_US(CPU)) tsc (.clk, .rst, .ts_out, .cyc(gps.cyc), .pps_cycle(gps.pps_cycle),
                                      .gps_ss(gps.ss), .compare);

  `include "vme_master_tasks.svh"

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // rising-edge counters of the control outputs
  logic [7:0] prev;
  int n_trg, n_clr, n_crst, n_lne, n_ref, n_pause, n_busy, n_sbc;
  always @(posedge clk) begin
    if (rst) begin
      prev <= '0;
      {n_trg, n_clr, n_crst, n_lne, n_ref, n_pause, n_busy, n_sbc} = '0;
    end else begin
      prev <= {trg, clr, crst, lne, ref10_out, pause_pulses, busy_pulses, sbc_readout};
      if (trg && !prev[7]) n_trg++;
      if (clr && !prev[6]) n_clr++;
      if (crst && !prev[5]) n_crst++;
      if (lne && !prev[4]) n_lne++;
      if (ref10_out && !prev[3]) n_ref++;
      if (pause_pulses && !prev[2]) n_pause++;
      if (busy_pulses && !prev[1]) n_busy++;
      if (sbc_readout && !prev[0]) n_sbc++;
    end
  end

  // receiver of the configuration line
  int n_cfg_bytes = 0;
  initial begin
    forever begin
      @(negedge gps_txd);
      repeat (CPB / 2 + 9 * CPB) @(posedge clk);
      n_cfg_bytes++;
    end
  end

  task automatic wait_pps(int n);
    wait (gps.pps_count == n);
    repeat (200) @(posedge clk);
  endtask

  initial begin
    repeat (8 * SEC) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_sync = 0, n_err_seen = 0, n_fifo_words = 0, n_ext = 0;

  initial begin
    int t0;
    string cfg = "$CFG,2*29\r\n";
    repeat (5) @(posedge clk);
    rst = 0;
    // lock to GPS
    wait_pps(2);
    vme_read(CKB + 24'(2 * CK_STATUS), rd);
    if (rd[15]) n_sync++;
    wait_pps(3);
    compare = 1;
    vme_read(CKB + 24'(2 * CK_STATUS), rd);
    check(rd[15] && rd[3:0] == 0, $sformatf("clock locked without errors (%h)", rd));
    // run: clear the TDCs, start periodic triggers
    vme_write(CTB + 24'(2 * CT_CMD), 16'h0003);
    vme_write(CTB + 24'(2 * CT_CTRL), 16'h0011);
    repeat (SEC / 10) @(posedge clk);
    check(n_trg >= 1900 && n_trg <= 2000, $sformatf("%0d triggers in 0.1 s at 100 clocks", n_trg));
    // one TDC almost full -> busy pulses and an automatic read-out request
    vme_write(CTB + 24'(2 * CT_CTRL), 16'h0031);
    almost_full[N_AF-1] = 1;
    repeat (2000) @(posedge clk);
    vme_read(CTB + 24'(2 * CT_AF_HI), rd);
    check(rd == 16'h0080, $sformatf("Almost Full register %h", rd));
    almost_full = '0;
    // external trigger mode
    vme_write(CTB + 24'(2 * CT_CTRL), 16'h0012);
    repeat (10) @(posedge clk);
    t0 = n_trg;
    for (int i = 0; i < 5; i++) begin
      ext_trig_in = 1; repeat (20) @(posedge clk);
      ext_trig_in = 0; repeat (20) @(posedge clk);
    end
    n_ext = n_trg - t0;
    check(n_ext == 5, $sformatf("external triggers %0d", n_ext));
    // receiver configuration
    foreach (cfg[i]) vme_write(CKB + 24'(2 * CK_CFG_DATA), 16'(cfg[i]));
    vme_write(CKB + 24'(2 * CK_CFG_SEND), 16'(cfg.len()));
    // a corrupted sentence -> error bits in the next second's timestamps
    wait_pps(4);
    gps.corrupt = 1;
    wait_pps(5);
    if (err.nmea_err) n_err_seen++;
    repeat (SEC / 10) @(posedge clk);
    check(tsc.last_err[3], "timestamps carry error 4");
    // 20 us timestamps for a while
    vme_write(CKB + 24'(2 * CK_CTRL), 16'h0003);
    repeat (SEC / 10) @(posedge clk);
    vme_write(CKB + 24'(2 * CK_CTRL), 16'h0001);
    // pause, then read the health FIFO
    vme_write(CTB + 24'(2 * CT_CTRL), 16'h0010);
    vme_read(CKB + 24'(2 * CK_FIFO0_CNT), rd);
    t0 = int'(rd[12:0]);
    for (int i = 0; i < t0; i++) begin
      vme_read(CKB + 24'(2 * CK_FIFO0), rd);
      n_fifo_words++;
    end
    wait_pps(6);
    check(err == 0, $sformatf("no errors at the end (%b)", err));
    repeat (SEC / 10) @(posedge clk);

    // every mechanism must have happened
    check(tsc.n_good > 0 && tsc.n_bad == 0, $sformatf("timestamps: %0d good, %0d bad", tsc.n_good, tsc.n_bad));
    check(tsc.n_sp10 > 0, $sformatf("10 us timestamp spacing: %0d", tsc.n_sp10));
    check(tsc.n_sp20 > 0, $sformatf("20 us timestamp spacing: %0d", tsc.n_sp20));
    check(n_sync > 0, "clock synchronized to GPS");
    check(n_err_seen > 0 && tsc.n_err_bits > 0, "error code raised and sent");
    check(n_fifo_words >= 5, $sformatf("health FIFO words read: %0d", n_fifo_words));
    check(n_cfg_bytes == cfg.len(), $sformatf("configuration bytes sent: %0d", n_cfg_bytes));
    check(n_trg > 0 && n_ext > 0, "triggers");
    check(trig_count == 32'(n_trg), "trigger counter");
    check(n_clr == 1, $sformatf("CLR pulses: %0d", n_clr));
    check(n_crst == 1, $sformatf("CRST pulses: %0d", n_crst));
    check(n_lne > 0, $sformatf("LNE periods: %0d", n_lne));
    check(n_ref > 0, $sformatf("10 MHz reference periods: %0d", n_ref));
    check(n_pause > 0, $sformatf("Pause Pulses: %0d", n_pause));
    check(n_busy > 0, $sformatf("Busy Pulses: %0d", n_busy));
    check(n_sbc > 0, $sformatf("SBC read-out requests: %0d", n_sbc));
    check(vme_timeouts == 0, "VME answered every cycle");
    $display("mechanisms: ts=%0d sync=%0d trg=%0d clr=%0d crst=%0d lne=%0d ref=%0d pause=%0d busy=%0d sbc=%0d cfg=%0d fifo=%0d",
             tsc.n_trains, n_sync, n_trg, n_clr, n_crst, n_lne, n_ref, n_pause, n_busy, n_sbc, n_cfg_bytes, n_fifo_words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
