// tb_hclock_clock_fw: self-checking test of the Clock card firmware with a
// GPS receiver model, at 2 clocks per microsecond (1 s = 2,000,000 clocks)
// and 16 clocks per RS232 bit. An independent decoder turns the 32 timestamp
// channels back into words by pulse width and checks them against the
// receiver's second and the clocks elapsed since its 1PPS. Also checked over
// VME: synchronization, GPS time, TDOP, the health FIFOs, the error code
// after a corrupted sentence, a missing sentence set and a 10 MHz slip, the
// 20 us mode, and a configuration string sent to the receiver.
module tb_hclock_clock_fw;
  import gtc_pkg::*;
  localparam int CPU = 2;
  localparam int SEC = CPU * 1_000_000;
  localparam int CPB = 16;
  localparam logic [23:0] BASE = 24'h100000;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic gps_rxd, gps_txd, pps, ref10;
  vme_in_t vme_i = '{as_n: 1, ds_n: 2'b11, write_n: 1, am: 0, addr: 0, data: 0};
  vme_out_t vme_o;
  logic [31:0] ts_out, ts_word;
  logic ts_sent;
  bcd_time_t now;
  ts_err_t err;
  logic [15:0] vme_rdata, rd;
  int vme_timeouts = 0;
  int checks = 0, failures = 0;

  gps_receiver_model #(.CLK_PER_SEC(SEC), .CLKS_PER_BIT(CPB)) gps (.clk, .rxd(gps_rxd), .pps, .ref10);

  hclock_clock_fw #(.BASE_ADDR(BASE), .CLK_PER_US(CPU), .CLKS_PER_BIT(CPB), .PPS_TIMEOUT(3 * SEC),
                    .FIFO_DEPTH(16), .CFG_BYTES(16)) dut (
    .clk, .rst, .gps_rxd, .gps_txd, .pps_in(pps), .ref10_in(ref10), .vme_i, .vme_o,
    .ts_out, .ts_word, .ts_sent, .now, .err);

  `include "vme_master_tasks.svh"

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- independent timestamp decoder ----
  int width [32];
  logic [31:0] prev = 0, got;
  longint rise_cyc, last_rise = -1;
  int n_trains = 0, n_good = 0, n_bad_time = 0, n_err_bits = 0, n_spacing20 = 0, n_spacing10 = 0;
  logic [3:0] last_err;
  int exp_ss, exp_sub, got_sub;
  always @(posedge clk) if (!rst) begin
    prev <= ts_out;
    if (ts_out != 0 && prev == 0) begin
      rise_cyc = gps.cyc;
      if (last_rise >= 0 && rise_cyc - last_rise == 10 * CPU) n_spacing10++;
      if (last_rise >= 0 && rise_cyc - last_rise == 20 * CPU) n_spacing20++;
      last_rise = rise_cyc;
      for (int i = 0; i < 32; i++) width[i] = 0;
    end
    for (int i = 0; i < 32; i++) if (ts_out[i]) width[i]++;
    if (ts_out == 0 && prev != 0) begin
      for (int i = 0; i < 32; i++) got[i] = (width[i] == 2 * CPU);
      n_trains++;
      last_err = got[3:0];
      if (got[3:0] != 0) n_err_bits++;
      // expected: receiver second and 10 us units since its 1PPS
      if (gps.pps_count >= 3 && rise_cyc - gps.pps_cycle > 100 * CPU && SEC - (rise_cyc - gps.pps_cycle) > 100 * CPU) begin
        exp_ss = gps.ss;
        exp_sub = int'((rise_cyc - gps.pps_cycle) / (10 * CPU));
        got_sub = 10000 * int'(got[23:20]) + 1000 * int'(got[19:16]) + 100 * int'(got[15:12]) +
                  10 * int'(got[11:8]) + int'(got[7:4]);
        if (10 * int'(got[31:28]) + int'(got[27:24]) == exp_ss && got_sub <= exp_sub && exp_sub - got_sub <= 1)
          n_good++;
        else begin
          n_bad_time++;
          if (n_bad_time < 5) $display("bad timestamp %h: expected ss %0d sub %0d", got, exp_ss, exp_sub);
        end
      end
    end
  end

  // ---- independent receiver for the configuration line ----
  byte unsigned cfg_got[$];
  initial begin
    forever begin
      byte unsigned b;
      @(negedge gps_txd);
      repeat (CPB / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge clk); b[i] = gps_txd; end
      repeat (CPB) @(posedge clk);
      cfg_got.push_back(b);
    end
  end

  task automatic wait_pps(int n);
    wait (gps.pps_count == n);
    repeat (200) @(posedge clk);
  endtask

  initial begin
    repeat (16 * SEC) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n0, g0;
    string cfg = "$CFG,1*2A\r\n";
    repeat (5) @(posedge clk);
    rst = 0;
    // 1PPS 1: no sentence yet -> communication lost
    wait_pps(1);
    vme_read(BASE + 24'(2 * CK_STATUS), rd);
    check(rd[1] && !rd[15], $sformatf("first 1PPS: comm lost, not synced (%h)", rd));
    // 1PPS 2: first synchronization, mismatch flagged
    wait_pps(2);
    vme_read(BASE + 24'(2 * CK_STATUS), rd);
    check(rd[15] && rd[0] && rd[3:1] == 0, $sformatf("second 1PPS: synced by overwrite (%h)", rd));
    // 1PPS 3: in step
    wait_pps(3);
    vme_read(BASE + 24'(2 * CK_STATUS), rd);
    check(rd[15] && rd[3:0] == 0 && !rd[14] && !rd[13], $sformatf("third 1PPS: no errors (%h)", rd));
    check(rd[12:11] == 2'd3 && rd[10:7] == 4'd8, "fix 3, 8 satellites");
    vme_read(BASE + 24'(2 * CK_GPS_HHMM), rd);
    check(rd == 16'h2134, $sformatf("GPS hh:mm %h", rd));
    vme_read(BASE + 24'(2 * CK_TDOP), rd);
    check(rd == 16'h0125, $sformatf("TDOP %h", rd));
    vme_read(BASE + 24'(2 * CK_TIME_HI), rd);
    check(rd[15:8] == {4'(gps.ss / 10), 4'(gps.ss % 10)}, $sformatf("clock seconds %h vs %0d", rd, gps.ss));
    // health FIFOs: one word per 1PPS
    vme_read(BASE + 24'(2 * CK_FIFO0_CNT), rd);
    check(rd[12:0] == 3, $sformatf("status FIFO holds 3 words (%h)", rd));
    vme_read(BASE + 24'(2 * CK_FIFO0), rd);
    check(rd[1] && !rd[15], "FIFO word 1: comm lost");
    vme_read(BASE + 24'(2 * CK_FIFO0), rd);
    check(rd[0] && rd[15], "FIFO word 2: overwrite");
    vme_read(BASE + 24'(2 * CK_FIFO0), rd);
    check(rd[3:0] == 0 && rd[15], "FIFO word 3: healthy");
    vme_read(BASE + 24'(2 * CK_FIFO1), rd);
    vme_read(BASE + 24'(2 * CK_FIFO1), rd);
    check(rd == 16'h0125, "TDOP FIFO");
    // corrupted POLYT in this second -> error 4 (and comm lost) in the next
    gps.corrupt = 1;
    n0 = n_err_bits;
    wait_pps(4);
    check(err.nmea_err && err.comm_lost, "corrupted sentence -> errors 4 and 2");
    repeat (SEC / 4) @(posedge clk);
    check(n_err_bits > n0 && last_err[3] && last_err[1], "timestamps carry the error bits");
    // 20 us mode
    vme_write(BASE + 24'(2 * CK_CTRL), 16'h0003);
    g0 = n_spacing20;
    repeat (SEC / 10) @(posedge clk);
    check(n_spacing20 > g0 + 100, "20 us spacing");
    vme_write(BASE + 24'(2 * CK_CTRL), 16'h0001);
    // configuration string
    foreach (cfg[i]) vme_write(BASE + 24'(2 * CK_CFG_DATA), 16'(cfg[i]));
    vme_write(BASE + 24'(2 * CK_CFG_SEND), 16'(cfg.len()));
    vme_read(BASE + 24'(2 * CK_CFG_SEND), rd);
    check(rd[15], "config sender busy");
    repeat (cfg.len() * 10 * CPB + 100) @(posedge clk);
    check(cfg_got.size() == cfg.len(), $sformatf("config bytes %0d", cfg_got.size()));
    for (int i = 0; i < cfg.len() && i < cfg_got.size(); i++) check(cfg_got[i] == cfg[i], "config byte");
    // 10 MHz slip
    wait_pps(5);
    check(err == 0, $sformatf("errors clear again (%b)", err));
    gps.slip = 1;
    wait_pps(6);
    vme_read(BASE + 24'(2 * CK_STATUS), rd);
    check(rd[14], "10 MHz slip -> lock error");
    // receiver silent
    gps.silent = 1;
    wait_pps(7);
    check(err.comm_lost, "silent receiver -> comm lost");
    check(n_spacing10 > 1000, "10 us spacing");
    check(n_good > 1000 && n_bad_time == 0, $sformatf("timestamps: %0d good, %0d bad", n_good, n_bad_time));
    check(vme_timeouts == 0, "VME answered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
