// gtc_pkg: types and constants shared by the GPS Timing and Control (GTC)
// firmware. It defines the 8-digit BCD clock time (tens of seconds down to
// microseconds), the 4-bit timestamp error code, the GPS receiver health
// record produced by the NMEA reader, the trigger modes of the Control card,
// the VME bus bundles, and the register maps of the Clock and Control cards.
// The digit layout, the error meanings and the trigger modes follow the
// document; bit positions of the error code, the register maps and the VME
// bundle layout are this design's own choices.
package gtc_pkg;

  // One BCD digit.
  typedef logic [3:0] bcd_t;

  // Internal clock time, most significant digit first. The 28-bit TDC
  // timestamp is s10..us10 (ss:mmm:uu); us1 is kept only inside the clock.
  typedef struct packed {
    bcd_t s10;    // tens of seconds (0..5)
    bcd_t s1;     // seconds
    bcd_t ms100;
    bcd_t ms10;
    bcd_t ms1;
    bcd_t us100;
    bcd_t us10;
    bcd_t us1;
  } bcd_time_t;

  // Timestamp error code: the four low bits of the 32-bit timestamp.
  typedef struct packed {
    logic nmea_err;      // error 4: NMEA string with errors
    logic no_fix;        // error 3: not enough satellites for a GPS fix
    logic comm_lost;     // error 2: lost communication with the receiver
    logic clk_mismatch;  // error 1: internal clock did not match GPS time
  } ts_err_t;

  // Receiver health and time extracted from the NMEA strings.
  typedef struct packed {
    logic [1:0] fix;     // GPS fix 1..3 (GPGSA mode field)
    logic [3:0] nsats;   // satellites used (GPGSA), saturates at 12
    logic [15:0] tdop;   // TDOP as BCD dd.dd (POLYP)
    bcd_t hh10, hh1, mm10, mm1, ss10, ss1;  // UTC time (POLYT)
  } gps_info_t;

  // Trigger module modes.
  typedef enum logic [1:0] {
    TRIG_PAUSE    = 2'd0,
    TRIG_PERIODIC = 2'd1,
    TRIG_EXTERNAL = 2'd2
  } trig_mode_e;

  // VME bus as seen by a slave (active-low strobes, as on the backplane).
  typedef struct packed {
    logic        as_n;
    logic [1:0]  ds_n;
    logic        write_n;
    logic [5:0]  am;
    logic [23:1] addr;
    logic [15:0] data;
  } vme_in_t;

  // Slave drive: data and DTACK with their output enables.
  typedef struct packed {
    logic [15:0] data;
    logic        data_oe;
    logic        dtack_n;
    logic        dtack_oe;
  } vme_out_t;

  // A24 address modifiers accepted (non-privileged / supervisory,
  // data and program access).
  localparam logic [5:0] AM_A24_NP_DATA = 6'h39;
  localparam logic [5:0] AM_A24_NP_PROG = 6'h3A;
  localparam logic [5:0] AM_A24_SU_DATA = 6'h3D;
  localparam logic [5:0] AM_A24_SU_PROG = 6'h3E;

  // Register word index (VME A[7:1]) of the Clock card.
  localparam logic [6:0] CK_CTRL      = 7'h00;  // RW [0] ts_enable [1] 20 us interval
  localparam logic [6:0] CK_STATUS    = 7'h01;  // R  error code, phase flags, synced
  localparam logic [6:0] CK_TIME_HI   = 7'h02;  // R  s10 s1 ms100 ms10 (latches TIME_LO)
  localparam logic [6:0] CK_TIME_LO   = 7'h03;  // R  ms1 us100 us10 us1
  localparam logic [6:0] CK_GPS_HHMM  = 7'h04;  // R  GPS hh mm (BCD)
  localparam logic [6:0] CK_GPS_SS    = 7'h05;  // R  GPS ss, fix, nsats
  localparam logic [6:0] CK_TDOP      = 7'h06;  // R  TDOP BCD
  localparam logic [6:0] CK_PHASE     = 7'h07;  // R  last 1PPS phase (25 ns units)
  localparam logic [6:0] CK_FIFO0     = 7'h08;  // R  pop status FIFO
  localparam logic [6:0] CK_FIFO0_CNT = 7'h09;  // R  status FIFO fill level
  localparam logic [6:0] CK_FIFO1     = 7'h0A;  // R  pop TDOP FIFO
  localparam logic [6:0] CK_FIFO1_CNT = 7'h0B;  // R  TDOP FIFO fill level
  localparam logic [6:0] CK_CFG_DATA  = 7'h10;  // W  append one byte to config text
  localparam logic [6:0] CK_CFG_SEND  = 7'h11;  // W  send N bytes; R [0] busy

  // Register word index (VME A[7:1]) of the Control card.
  localparam logic [6:0] CT_CTRL      = 7'h00;  // RW [1:0] mode [4] lne_en [5] sbc_auto
  localparam logic [6:0] CT_PERIOD_LO = 7'h01;  // RW trigger period in clocks, low
  localparam logic [6:0] CT_PERIOD_HI = 7'h02;  // RW trigger period in clocks, high
  localparam logic [6:0] CT_CMD       = 7'h03;  // W  [0] CLR [1] CRST [2] SBC read-out
  localparam logic [6:0] CT_STATUS    = 7'h04;  // R  [0] paused [1] busy [2] LNE enable in
  localparam logic [6:0] CT_AF_LO     = 7'h05;  // R  Almost Full inputs 15..0
  localparam logic [6:0] CT_AF_HI     = 7'h06;  // R  Almost Full inputs 31..16

  // BCD helpers.
  function automatic logic [7:0] bcd2_inc_mod60(input logic [7:0] v);
    logic [3:0] t, o;
    t = v[7:4];
    o = v[3:0];
    if (o == 4'd9) begin
      o = 4'd0;
      t = (t == 4'd5) ? 4'd0 : t + 4'd1;
    end else begin
      o = o + 4'd1;
    end
    return {t, o};
  endfunction

  // Advance the clock by one microsecond; tens of seconds wrap 5 -> 0.
  function automatic bcd_time_t bcd_time_inc(input bcd_time_t t);
    bcd_time_t r;
    logic      c;
    r = t;
    c = 1'b1;
    if (c) begin if (r.us1   == 4'd9) r.us1   = 4'd0; else begin r.us1   = r.us1   + 4'd1; c = 1'b0; end end
    if (c) begin if (r.us10  == 4'd9) r.us10  = 4'd0; else begin r.us10  = r.us10  + 4'd1; c = 1'b0; end end
    if (c) begin if (r.us100 == 4'd9) r.us100 = 4'd0; else begin r.us100 = r.us100 + 4'd1; c = 1'b0; end end
    if (c) begin if (r.ms1   == 4'd9) r.ms1   = 4'd0; else begin r.ms1   = r.ms1   + 4'd1; c = 1'b0; end end
    if (c) begin if (r.ms10  == 4'd9) r.ms10  = 4'd0; else begin r.ms10  = r.ms10  + 4'd1; c = 1'b0; end end
    if (c) begin if (r.ms100 == 4'd9) r.ms100 = 4'd0; else begin r.ms100 = r.ms100 + 4'd1; c = 1'b0; end end
    if (c) begin if (r.s1    == 4'd9) r.s1    = 4'd0; else begin r.s1    = r.s1    + 4'd1; c = 1'b0; end end
    if (c) begin if (r.s10   == 4'd5) r.s10   = 4'd0; else r.s10 = r.s10 + 4'd1; end
    return r;
  endfunction

endpackage
