// tb_hclock_control_fw: self-checking test of the Control card firmware,
// driven only through VME and its input pins. LNE is shortened to a 100
// clock period; everything else runs at its default. Checked: reset state
// (paused, Pause Pulses running, no triggers), periodic triggers at the
// default 1000 clock period and at a period written over VME, external
// triggers, CLR / CRST / SBC read-out pulses from the command register,
// the LNE enables, Busy Pulses from an Almost Full input and the Almost
// Full register, and the 10 MHz reference.
module tb_hclock_control_fw;
  import gtc_pkg::*;
  localparam logic [23:0] BASE = 24'h200000;
  localparam int N_AF = 24;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  vme_in_t vme_i = '{as_n: 1, ds_n: 2'b11, write_n: 1, am: 0, addr: 0, data: 0};
  vme_out_t vme_o;
  logic ext_trig_in = 0, lne_enable_in = 1;
  logic [N_AF-1:0] almost_full = '0;
  logic trg, clr, crst, lne, ref10, pause_pulses, busy_pulses, sbc_readout;
  logic [31:0] trig_count;
  logic [15:0] vme_rdata, rd;
  int vme_timeouts = 0;
  int checks = 0, failures = 0;

  hclock_control_fw #(.BASE_ADDR(BASE), .N_AF(N_AF), .LNE_HALF(50)) dut (
    .clk, .rst, .vme_i, .vme_o, .ext_trig_in, .lne_enable_in, .almost_full,
    .trg, .clr, .crst, .lne, .ref10, .pause_pulses, .busy_pulses, .sbc_readout, .trig_count);

  `include "vme_master_tasks.svh"

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // rising-edge counters and spacing of TRG
  logic [7:0] prev;
  int n_trg, n_clr, n_crst, n_lne, n_ref, n_pause, n_busy, n_sbc;
  int w_clr, w_crst;
  longint cyc = 0, last_trg = -1, trg_gap = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst) begin
      prev <= '0;
      {n_trg, n_clr, n_crst, n_lne, n_ref, n_pause, n_busy, n_sbc} = '0;
      {w_clr, w_crst} = '0;
    end else begin
      prev <= {trg, clr, crst, lne, ref10, pause_pulses, busy_pulses, sbc_readout};
      if (trg && !prev[7]) begin
        n_trg++;
        if (last_trg >= 0) trg_gap = cyc - last_trg;
        last_trg = cyc;
      end
      if (clr && !prev[6]) n_clr++;
      if (crst && !prev[5]) n_crst++;
      if (lne && !prev[4]) n_lne++;
      if (ref10 && !prev[3]) n_ref++;
      if (pause_pulses && !prev[2]) n_pause++;
      if (busy_pulses && !prev[1]) n_busy++;
      if (sbc_readout && !prev[0]) n_sbc++;
      if (clr) w_clr++;
      if (crst) w_crst++;
    end
  end

  task automatic window(int n, output int d_trg, output int d_lne, output int d_ref,
                        output int d_pause, output int d_busy);
    int t0 = n_trg, l0 = n_lne, r0 = n_ref, p0 = n_pause, b0 = n_busy;
    repeat (n) @(posedge clk);
    d_trg = n_trg - t0; d_lne = n_lne - l0; d_ref = n_ref - r0;
    d_pause = n_pause - p0; d_busy = n_busy - b0;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dt, dl, dr, dp, db;
    repeat (5) @(posedge clk);
    rst = 0;
    repeat (20) @(posedge clk);
    // reset state
    window(4000, dt, dl, dr, dp, db);
    check(dt == 0, "paused: no triggers");
    check(dr == 1000, $sformatf("10 MHz reference: %0d periods in 4000 clocks", dr));
    check(dp == 1000, $sformatf("Pause Pulses while paused: %0d", dp));
    check(db == 0, "no Busy Pulses");
    check(dl == 40, $sformatf("LNE: %0d periods in 4000 clocks", dl));
    vme_read(BASE + 24'(2 * CT_STATUS), rd);
    check(rd[0] && !rd[1] && rd[2], $sformatf("status paused, not busy, LNE enable (%h)", rd));
    vme_read(BASE + 24'(2 * CT_PERIOD_LO), rd);
    check(rd == 16'd1000, "default period 1000 clocks (40 kHz)");
    // periodic at the default period
    vme_write(BASE + 24'(2 * CT_CTRL), 16'h0011);
    window(20000, dt, dl, dr, dp, db);
    check(dt >= 19 && dt <= 20, $sformatf("periodic: %0d triggers in 20000 clocks", dt));
    check(trg_gap == 1000, $sformatf("trigger spacing %0d", trg_gap));
    check(dp == 0, "no Pause Pulses while running");
    // new period
    vme_write(BASE + 24'(2 * CT_PERIOD_LO), 16'd250);
    window(10000, dt, dl, dr, dp, db);
    check(trg_gap == 250, $sformatf("trigger spacing after write %0d", trg_gap));
    // external
    vme_write(BASE + 24'(2 * CT_CTRL), 16'h0012);
    repeat (10) @(posedge clk);
    dt = n_trg;
    for (int i = 0; i < 7; i++) begin
      ext_trig_in = 1; repeat (13) @(posedge clk);
      ext_trig_in = 0; repeat (29) @(posedge clk);
    end
    check(n_trg - dt == 7, $sformatf("external: %0d triggers for 7 edges", n_trg - dt));
    // commands
    vme_write(BASE + 24'(2 * CT_CMD), 16'h0001);
    vme_write(BASE + 24'(2 * CT_CMD), 16'h0002);
    vme_write(BASE + 24'(2 * CT_CMD), 16'h0003);
    vme_write(BASE + 24'(2 * CT_CMD), 16'h0004);
    repeat (20) @(posedge clk);
    check(n_clr == 2 && w_clr == 8, $sformatf("CLR pulses %0d, %0d clocks", n_clr, w_clr));
    check(n_crst == 2 && w_crst == 8, $sformatf("CRST pulses %0d, %0d clocks", n_crst, w_crst));
    check(n_sbc == 1, "SBC read-out request");
    // LNE enables
    vme_write(BASE + 24'(2 * CT_CTRL), 16'h0002);
    window(2000, dt, dl, dr, dp, db);
    check(dl == 0 && lne == 0, "LNE off by VME");
    vme_write(BASE + 24'(2 * CT_CTRL), 16'h0012);
    lne_enable_in = 0;
    window(2000, dt, dl, dr, dp, db);
    check(dl == 0 && lne == 0, "LNE off by LNE Enable input");
    lne_enable_in = 1;
    window(2000, dt, dl, dr, dp, db);
    check(dl == 20, $sformatf("LNE back: %0d", dl));
    // Busy from one Almost Full input
    almost_full[17] = 1;
    repeat (10) @(posedge clk);
    window(2000, dt, dl, dr, dp, db);
    check(db == 500, $sformatf("Busy Pulses %0d", db));
    vme_read(BASE + 24'(2 * CT_AF_HI), rd);
    check(rd == 16'h0002, $sformatf("Almost Full register %h", rd));
    vme_read(BASE + 24'(2 * CT_STATUS), rd);
    check(rd[1], "status busy");
    // automatic SBC request on busy
    dt = n_sbc;
    vme_write(BASE + 24'(2 * CT_CTRL), 16'h0032);
    almost_full[17] = 0;
    repeat (20) @(posedge clk);
    almost_full[3] = 1;
    repeat (20) @(posedge clk);
    check(n_sbc - dt == 1, "automatic SBC read-out request on busy");
    almost_full = '0;
    repeat (10) @(posedge clk);
    window(2000, dt, dl, dr, dp, db);
    check(db == 0, "Busy Pulses stop");
    // back to pause
    vme_write(BASE + 24'(2 * CT_CTRL), 16'h0010);
    repeat (10) @(posedge clk);
    window(2000, dt, dl, dr, dp, db);
    check(dt == 0 && dp == 500, $sformatf("paused again: %0d triggers, %0d pause pulses", dt, dp));
    check(trig_count == 32'(n_trg), "trigger counter");
    check(vme_timeouts == 0, "VME answered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
