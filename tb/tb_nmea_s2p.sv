// tb_nmea_s2p: self-checking test of the NMEA serial-to-parallel converter.
// Sends POLYT, GPGSA and POLYP sentences over a fast RS232 line (8 clocks per
// bit) and checks the extracted time, fix, satellite count and TDOP, the
// strobes, and that sentences with a bad checksum are rejected with an
// error pulse and leave the outputs unchanged.
module tb_nmea_s2p;
  import gtc_pkg::*;
  import nmea_tb_pkg::*;
  localparam int CPB = 8;
  logic clk = 0, rst = 1, rxd = 1;
  always #5 clk = ~clk;
  gps_info_t info;
  logic time_strobe, gsa_strobe, tdop_strobe, nmea_err;
  int checks = 0, failures = 0;
  int n_time = 0, n_gsa = 0, n_tdop = 0, n_err = 0;

  nmea_s2p #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst, .rxd, .info, .time_strobe, .gsa_strobe,
                                      .tdop_strobe, .nmea_err);

  always @(posedge clk) if (!rst) begin
    n_time += int'(time_strobe); n_gsa += int'(gsa_strobe);
    n_tdop += int'(tdop_strobe); n_err += int'(nmea_err);
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send_byte(byte unsigned b);
    rxd = 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (CPB) @(posedge clk); end
    rxd = 1; repeat (CPB) @(posedge clk);
  endtask

  task automatic send_str(string s);
    for (int i = 0; i < s.len(); i++) send_byte(s[i]);
    repeat (3 * CPB) @(posedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5) @(posedge clk);
    rst = 0;
    repeat (20) @(posedge clk);
    send_str(polyt(21, 34, 57));
    check(n_time == 1 && n_err == 0, "POLYT accepted");
    check({info.hh10, info.hh1, info.mm10, info.mm1, info.ss10, info.ss1} == 24'h213457, "POLYT time");
    send_str(gpgsa(3, 7));
    check(n_gsa == 1 && n_err == 0, $sformatf("GPGSA accepted %0d %0d", n_gsa, n_err));
    check(info.fix == 2'd3 && info.nsats == 4'd7, "GPGSA fix and satellites");
    send_str(polyp(21, 34, 57, "1.25"));
    check(n_tdop == 1 && n_err == 0, $sformatf("POLYP accepted %0d %0d %s", n_tdop, n_err, polyp(21,34,57,"1.25")));
    check(info.tdop == 16'h0125, $sformatf("TDOP %h", info.tdop));
    // corrupted sentences: rejected, outputs unchanged
    send_str(polyt(22, 0, 1, 1'b1));
    check(n_time == 1 && n_err == 1, "bad POLYT rejected");
    check({info.hh10, info.hh1, info.mm10, info.mm1, info.ss10, info.ss1} == 24'h213457, "time kept");
    send_str(gpgsa(1, 2, 1'b1));
    check(n_gsa == 1 && n_err == 2 && info.fix == 2'd3, "bad GPGSA rejected");
    // a sentence the reader does not use: accepted silently
    send_str(nmea_sentence("GPZDA,213458.00,03,10,2015,00,00"));
    check(n_err == 2 && n_time == 1, "other sentence ignored");
    // second good round with new values
    send_str(polyt(0, 0, 9));
    send_str(gpgsa(1, 0));
    send_str(polyp(0, 0, 9, "12.5"));
    check(n_time == 2 && n_gsa == 2 && n_tdop == 2 && n_err == 2, "second round accepted");
    check(info.ss10 == 4'd0 && info.ss1 == 4'd9, "second time");
    check(info.fix == 2'd1 && info.nsats == 4'd0, "no fix, no satellites");
    check(info.tdop == 16'h1250, $sformatf("TDOP 12.5 -> %h", info.tdop));
    // truncated sentence followed by a new one
    send_str("$POLYT,1200");
    send_str(polyt(12, 0, 0));
    check(n_err == 3 && n_time == 3 && info.hh10 == 4'd1 && info.hh1 == 4'd2, "truncated sentence flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
