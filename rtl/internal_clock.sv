// internal_clock: the continuously running 8-digit BCD clock of the Clock
// card (tens of seconds down to microseconds), kept in step with GPS time.
//
// A prescaler counts CLK_PER_US cycles of the 40 MHz clock per microsecond
// and advances the BCD digits; tens of seconds wrap 5 -> 0, so the time
// rolls over every minute. tick is high for the first clock of every new
// time value.
//
// The rising edge of the (synchronized) 1PPS marks the start of a second.
// The last POLYT time read before it, plus SECOND_OFFSET seconds, is the GPS
// time of that second, ss.000000. At each 1PPS edge the clock is compared
// with that value. To tolerate the known 1PPS jitter against the 40 MHz
// clock the comparison rounds the clock to the nearest microsecond (the
// next value is used when the prescaler is past its midpoint), so a 1PPS up
// to half a microsecond early or late still matches. If the two
// differ and the receiver is healthy (fresh time, fix 2D/3D, no NMEA
// error), the clock is overwritten with ss.000000 and the prescaler
// restarts.
//
// Error code (held for one second, updated at each 1PPS):
//   error 1 clk_mismatch: the clock did not match GPS time at this 1PPS
//   error 2 comm_lost:    no valid POLYT since the previous 1PPS, or no
//                         1PPS for PPS_TIMEOUT clocks
//   error 3 no_fix:       GPGSA fix below 2 (follows the receiver directly)
//   error 4 nmea_err:     an erroneous NMEA sentence in the last second
// The BCD clock, the 1PPS comparison and overwrite, the minute rollover and
// the error meanings follow the document; the rounding, the offset of the
// string time to the 1PPS, the health condition and the 1PPS time-out are
// this design's own choices.
module internal_clock
  import gtc_pkg::*;
#(
  parameter int   CLK_PER_US    = 40,
  parameter logic SECOND_OFFSET = 1'b1,
  parameter int   PPS_TIMEOUT   = 60_000_000  // 1.5 s at 40 MHz
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      pps,          // synchronized 1PPS level
  input  logic      time_strobe,  // new GPS time from the NMEA reader
  input  bcd_t      gps_ss10,
  input  bcd_t      gps_ss1,
  input  logic [1:0] gps_fix,
  input  logic      nmea_err,     // pulse: erroneous sentence
  output bcd_time_t now,
  output logic      tick,         // first clock of a new time value
  output logic [$clog2(CLK_PER_US)-1:0] prescale,
  output ts_err_t   err,
  output logic      pps_edge,     // one-clock pulse on 1PPS rising edge
  output logic      synced,       // clock has been set from GPS
  output logic      overwrite     // pulse: clock overwritten at this 1PPS
);
  localparam int PW = $clog2(CLK_PER_US);
  localparam int TW = $clog2(PPS_TIMEOUT + 1);

  logic       pps_d;
  logic [7:0] gps_next;        // BCD seconds of the coming 1PPS
  logic       time_fresh;
  logic       nmea_seen;
  logic [TW-1:0] pps_wd;
  bcd_time_t  now_inc, now_n, now_n_inc, rounded, gps_time;
  logic [PW-1:0] presc_n;
  logic       match, healthy;

  always_comb begin
    now_inc  = bcd_time_inc(now);
    // value after this clock edge, rounded to the nearest microsecond
    now_n     = (prescale == PW'(CLK_PER_US - 1)) ? now_inc : now;
    presc_n   = (prescale == PW'(CLK_PER_US - 1)) ? '0 : prescale + 1'b1;
    now_n_inc = bcd_time_inc(now_n);
    rounded   = (presc_n >= PW'(CLK_PER_US / 2)) ? now_n_inc : now_n;
    gps_time = '{s10: gps_next[7:4], s1: gps_next[3:0], default: 4'd0};
    match    = (rounded == gps_time);
    healthy  = time_fresh && (gps_fix >= 2'd2) && !nmea_seen && !nmea_err;
    pps_edge = pps && !pps_d;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pps_d      <= 1'b0;
      now        <= '0;
      prescale   <= '0;
      tick       <= 1'b0;
      gps_next   <= '0;
      time_fresh <= 1'b0;
      nmea_seen  <= 1'b0;
      pps_wd     <= '0;
      err        <= '{default: 1'b0, no_fix: 1'b1};
      synced     <= 1'b0;
      overwrite  <= 1'b0;
    end else begin
      pps_d     <= pps;
      tick      <= 1'b0;
      overwrite <= 1'b0;
      err.no_fix <= (gps_fix < 2'd2);

      // free-running microsecond clock
      if (prescale == PW'(CLK_PER_US - 1)) begin
        prescale <= '0;
        now      <= now_inc;
        tick     <= 1'b1;
      end else begin
        prescale <= prescale + 1'b1;
      end

      if (time_strobe)
        gps_next <= SECOND_OFFSET ? bcd2_inc_mod60({gps_ss10, gps_ss1}) : {gps_ss10, gps_ss1};
      if (nmea_err) nmea_seen <= 1'b1;

      if (pps_edge) begin
        pps_wd           <= '0;
        err.clk_mismatch <= time_fresh && !match;
        err.comm_lost    <= !time_fresh;
        err.nmea_err     <= nmea_seen || nmea_err;
        time_fresh       <= time_strobe;
        nmea_seen        <= 1'b0;
        if (healthy && !match) begin
          now       <= gps_time;
          prescale  <= '0;
          tick      <= 1'b1;
          overwrite <= 1'b1;
        end
        if (healthy) synced <= 1'b1;
      end else begin
        if (time_strobe) time_fresh <= 1'b1;
        if (pps_wd == TW'(PPS_TIMEOUT)) err.comm_lost <= 1'b1;
        else pps_wd <= pps_wd + 1'b1;
      end
    end
  end
endmodule
