// gps_receiver_model: behavioural model of the GPS receiver as the Clock
// card sees it (not synthesizable). Every CLK_PER_SEC clocks it raises 1PPS
// for PPS_WIDTH clocks; STR_DELAY clocks later it sends, on its RS232 line
// at CLKS_PER_BIT clocks per bit, the sentences $POLYT (UTC time of the
// second that just began), $GPGSA (fix, satellites) and $POLYP (TDOP). It
// also outputs the digitized 10 MHz reference, one period every 4 clocks.
// Test controls (set hierarchically): fix, nsats, tdop, corrupt (bad
// checksum on this second's POLYT), silent (no sentences), slip (stall
// the 10 MHz reference for 3 clocks once), jitter (each 1PPS lands up to
// this many clocks early or late), and the time hh:mm:ss.
// pps_count and pps_cycle report the last 1PPS.
module gps_receiver_model
  import nmea_tb_pkg::*;
#(
  parameter int CLK_PER_SEC  = 2_000_000,
  parameter int CLKS_PER_BIT = 16,
  parameter int PPS_WIDTH    = 100,
  parameter int STR_DELAY    = 1000
) (
  input  logic clk,
  output logic rxd,     // towards the Clock card
  output logic pps,
  output logic ref10
);
  int    hh = 21, mm = 34, ss = 50;
  int    fix = 3, nsats = 8;
  string tdop = "1.25";
  bit    corrupt = 0, silent = 0, slip = 0;
  int    pps_count = 0;
  longint cyc = 0, pps_cycle = -1;
  int    rc = 0, slip_left = 0;
  int    jitter = 0, jit_prev = 0, jit_now = 0;

  initial begin rxd = 1; pps = 0; ref10 = 0; end

  always @(negedge clk) begin
    cyc++;
    if (slip) begin slip = 0; slip_left = 3; end
    if (slip_left > 0) begin slip_left--; ref10 = 0; rc = 0; end
    else begin ref10 = (rc < 2); rc = (rc + 1) % 4; end
  end

  task automatic send_byte(byte unsigned b);
    rxd = 0; repeat (CLKS_PER_BIT) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (CLKS_PER_BIT) @(negedge clk); end
    rxd = 1; repeat (CLKS_PER_BIT) @(negedge clk);
  endtask

  task automatic send_str(string s);
    for (int i = 0; i < s.len(); i++) send_byte(s[i]);
  endtask

  // 1PPS
  initial begin
    forever begin
      jit_now = (jitter > 0) ? int'($urandom_range(2 * jitter, 0)) - jitter : 0;
      repeat (CLK_PER_SEC - PPS_WIDTH + jit_now - jit_prev) @(negedge clk);
      jit_prev = jit_now;
      ss = (ss + 1) % 60;
      if (ss == 0) mm = (mm + 1) % 60;
      pps = 1;
      pps_count++;
      pps_cycle = cyc;
      repeat (PPS_WIDTH) @(negedge clk);
      pps = 0;
    end
  end

  // sentences after each 1PPS
  initial begin
    forever begin
      @(posedge pps);
      repeat (STR_DELAY) @(negedge clk);
      if (!silent) begin
        send_str(polyt(hh, mm, ss, corrupt));
        corrupt = 0;
        send_str(gpgsa(fix, nsats));
        send_str(polyp(hh, mm, ss, tdop));
      end
    end
  end
endmodule
