// tb_gtc_top_full: the GPS Timing and Control system at its real sizes: a
// 40 MHz clock, 4800 baud RS232, 1 s between 1PPS pulses, 40 kHz triggers,
// 100 Hz LNE and 256-word health FIFOs. About four seconds are
// simulated: the clock locks to GPS at the second 1PPS and must agree with
// it at the third although from then on each 1PPS jitters by up to 50 ns
// (2 clocks); the timestamps of the following second are decoded and
// compared with the receiver's time, and the Control card runs periodic
// triggers, CLR / CRST and the scaler signals; every trigger must find a
// timestamp burst that started within the 10 us before it. Every mechanism is counted;
// one that never happened counts as a failure.
module tb_gtc_top_full;
  import gtc_pkg::*;
  localparam int CPU  = 40;
  localparam int SEC  = 40_000_000;
  localparam int CPB  = 8333;
  localparam logic [23:0] CKB = 24'h100000, CTB = 24'h200000;
  logic clk = 0, rst = 1;
  always #12.5 clk = ~clk;
  logic gps_rxd, gps_txd, pps, ref10_gps;
  vme_in_t vme_i = '{as_n: 1, ds_n: 2'b11, write_n: 1, am: 0, addr: 0, data: 0};
  vme_out_t vme_o;
  logic [31:0] ts_out, ts_word, trig_count;
  logic ts_sent, trg, clr, crst, lne, ref10_out, pause_pulses, busy_pulses, sbc_readout;
  logic ext_trig_in = 0, lne_enable_in = 1;
  logic [23:0] almost_full = '0;
  bcd_time_t now;
  ts_err_t err;
  logic [15:0] vme_rdata, rd;
  int vme_timeouts = 0;
  int checks = 0, failures = 0;
  logic compare = 0;

  gps_receiver_model #(.CLK_PER_SEC(SEC), .CLKS_PER_BIT(CPB), .PPS_WIDTH(4000), .STR_DELAY(40000))
    gps (.clk, .rxd(gps_rxd), .pps, .ref10(ref10_gps));

  gtc_top dut (
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

  logic [7:0] prev;
  int n_win_ok = 0, n_win_bad = 0;
  int n_trg, n_clr, n_crst, n_lne, n_ref, n_pause, n_busy, n_sbc;
  always @(posedge clk) begin
    if (rst) begin
      prev <= '0;
      {n_trg, n_clr, n_crst, n_lne, n_ref, n_pause, n_busy, n_sbc} = '0;
    end else begin
      prev <= {trg, clr, crst, lne, ref10_out, pause_pulses, busy_pulses, sbc_readout};
      if (trg && !prev[7]) begin
        n_trg++;
        if (compare) begin
          if (gps.cyc - tsc.last_rise <= 10 * CPU) n_win_ok++;
          else n_win_bad++;
        end
      end
      if (clr && !prev[6]) n_clr++;
      if (crst && !prev[5]) n_crst++;
      if (lne && !prev[4]) n_lne++;
      if (ref10_out && !prev[3]) n_ref++;
      if (pause_pulses && !prev[2]) n_pause++;
      if (busy_pulses && !prev[1]) n_busy++;
      if (sbc_readout && !prev[0]) n_sbc++;
    end
  end

  task automatic wait_pps(int n);
    wait (gps.pps_count == n);
    repeat (4000) @(posedge clk);
  endtask

  initial begin
    repeat (5 * SEC) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_sync = 0, n_fifo_words = 0, t_trg;

  initial begin
    repeat (5) @(posedge clk);
    rst = 0;
    wait_pps(1);
    check(err.comm_lost, "no time before the first sentences");
    wait_pps(2);
    vme_read(CKB + 24'(2 * CK_STATUS), rd);
    if (rd[15]) n_sync++;
    gps.jitter = 2;
    wait_pps(3);
    compare = 1;
    vme_read(CKB + 24'(2 * CK_STATUS), rd);
    check(rd[15] && rd[3:0] == 0 && !rd[13], $sformatf("clock locked, no errors despite 1PPS jitter (%h)", rd));
    vme_read(CKB + 24'(2 * CK_GPS_HHMM), rd);
    check(rd == 16'h2134, $sformatf("GPS hh:mm %h", rd));
    vme_read(CKB + 24'(2 * CK_FIFO0_CNT), rd);
    for (int i = 0; i < int'(rd[12:0]); i++) begin
      logic [15:0] w;
      vme_read(CKB + 24'(2 * CK_FIFO0), w);
      n_fifo_words++;
    end
    // a run: clear, 40 kHz triggers for 10 ms, an almost-full TDC
    vme_write(CTB + 24'(2 * CT_CMD), 16'h0003);
    vme_write(CTB + 24'(2 * CT_CTRL), 16'h0031);
    t_trg = n_trg;
    repeat (SEC / 100) @(posedge clk);
    check(n_trg - t_trg >= 399 && n_trg - t_trg <= 400, $sformatf("%0d triggers in 10 ms", n_trg - t_trg));
    almost_full[5] = 1;
    repeat (4000) @(posedge clk);
    almost_full = '0;
    vme_write(CTB + 24'(2 * CT_CTRL), 16'h0010);
    wait_pps(4);
    repeat (SEC / 100) @(posedge clk);

    check(tsc.n_good > 20000 && tsc.n_bad == 0, $sformatf("timestamps: %0d good, %0d bad", tsc.n_good, tsc.n_bad));
    check(tsc.n_sp10 > 0, "10 us timestamp spacing");
    check(n_win_ok > 0 && n_win_bad == 0, $sformatf("triggers with a timestamp in the 10 us before: %0d of %0d", n_win_ok, n_win_ok + n_win_bad));
    check(err == 0, $sformatf("no errors at the end (%b)", err));
    check(n_sync > 0, "clock synchronized to GPS");
    check(n_fifo_words == 3, $sformatf("health FIFO words: %0d", n_fifo_words));
    check(n_trg > 0 && trig_count == 32'(n_trg), "triggers and counter");
    check(n_clr == 1 && n_crst == 1, "CLR and CRST");
    check(n_lne >= 300, $sformatf("LNE periods: %0d", n_lne));
    check(n_ref > 0 && n_pause > 0 && n_busy > 0, "10 MHz, Pause and Busy pulses");
    check(n_sbc > 0, "SBC read-out request");
    check(vme_timeouts == 0, "VME answered every cycle");
    $display("mechanisms: ts=%0d sync=%0d trg=%0d clr=%0d crst=%0d lne=%0d ref=%0d pause=%0d busy=%0d sbc=%0d fifo=%0d",
             tsc.n_trains, n_sync, n_trg, n_clr, n_crst, n_lne, n_ref, n_pause, n_busy, n_sbc, n_fifo_words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
