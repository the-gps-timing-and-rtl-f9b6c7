// hclock_clock_fw: firmware of the Clock type HClock card. It keeps an
// internal BCD clock synchronized with GPS time and sends a TDC-readable
// timestamp every 10 us (or 20 us).
//
// Data path (all on the 40 MHz global clock):
//   RS232 from GPS -> nmea_s2p (GPS time, fix, satellites, TDOP)
//   1PPS + GPS time -> internal_clock (8-digit BCD clock, error code)
//   clock + error code -> timestamp_encoder -> ts_out[31:0] to the TDC
// Beside it: phase_monitor (1PPS and 10 MHz phase flags), two health FIFOs
// written once per second one clock after each 1PPS edge (status word and
// TDOP), gps_config_tx (configuration strings to the receiver), and the
// A24D16 VME register file described in gtc_pkg (CK_*).
// Status / FIFO0 word: [15] synced [14] 40/10 MHz lock error [13] 1PPS
// phase error [12:11] fix [10:7] satellites [3:0] error code.
// The asynchronous inputs (RS232, 1PPS, 10 MHz) pass through two-flop
// synchronizers. Timestamps are enabled, at 10 us, after reset.
// Lint notes stand on purpose: the GPGSA / POLYP strobes and the clock's
// prescaler are not needed here (their values are read whenever they
// change), a configuration byte uses only the low data byte, and only CTRL
// looks at a byte enable (the low one).
// The block structure follows the document's Clock firmware; the register
// map, the status word and the reset defaults are this design's own.
module hclock_clock_fw
  import gtc_pkg::*;
#(
  parameter logic [23:0] BASE_ADDR    = 24'h100000,
  parameter int          CLK_PER_US   = 40,
  parameter int          CLKS_PER_BIT = 8333,
  parameter int          PPS_TIMEOUT  = 60_000_000,
  parameter int          FIFO_DEPTH   = 256,
  parameter int          CFG_BYTES    = 128
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        gps_rxd,      // RS232 from the GPS receiver
  output logic        gps_txd,      // RS232 to the GPS receiver
  input  logic        pps_in,       // 1PPS from the GPS receiver
  input  logic        ref10_in,     // digitized 10 MHz from the receiver
  input  vme_in_t     vme_i,
  output vme_out_t    vme_o,
  output logic [31:0] ts_out,       // timestamp pulses to the TDC
  output logic [31:0] ts_word,      // word being sent (monitoring)
  output logic        ts_sent,
  output bcd_time_t   now,
  output ts_err_t     err
);
  localparam int PW = $clog2(CLK_PER_US);
  localparam int FW = $clog2(FIFO_DEPTH);
  localparam int CW = $clog2(CFG_BYTES);

  // synchronizers
  logic rxd_s, pps_s, ref10_s;
  sync2 #(.WIDTH(1), .RESET_VAL(1'b1)) u_sync_rx (.clk, .rst, .d(gps_rxd), .q(rxd_s));
  sync2 #(.WIDTH(2)) u_sync_ref (.clk, .rst, .d({pps_in, ref10_in}), .q({pps_s, ref10_s}));

  // serial to parallel converter
  gps_info_t info;
  logic      time_strobe, gsa_strobe, tdop_strobe, nmea_err;
  nmea_s2p #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_s2p (
    .clk, .rst, .rxd(rxd_s), .info, .time_strobe, .gsa_strobe, .tdop_strobe, .nmea_err
  );

  // internal clock
  logic          tick, pps_edge, synced, overwrite;
  logic [PW-1:0] prescale;
  internal_clock #(.CLK_PER_US(CLK_PER_US), .PPS_TIMEOUT(PPS_TIMEOUT)) u_clock (
    .clk, .rst, .pps(pps_s), .time_strobe, .gps_ss10(info.ss10), .gps_ss1(info.ss1),
    .gps_fix(info.fix), .nmea_err, .now, .tick, .prescale, .err, .pps_edge, .synced, .overwrite
  );

  // timestamp encoder
  logic ts_enable, interval_20us;
  timestamp_encoder #(.CLK_PER_US(CLK_PER_US)) u_enc (
    .clk, .rst, .enable(ts_enable), .interval_20us, .now, .tick, .err,
    .ts_out, .word(ts_word), .sent(ts_sent)
  );

  // phase monitor
  logic [PW-1:0]        pps_phase;
  logic signed [PW:0]   pps_dev;
  logic                 pps_phase_err, lock_err;
  phase_monitor #(.CLK_PER_US(CLK_PER_US)) u_phase (
    .clk, .rst, .pps_edge, .rephase(overwrite), .ref10(ref10_s),
    .pps_phase, .pps_dev, .pps_phase_err, .lock_err
  );

  // health FIFOs, written one clock after each 1PPS edge
  logic        pps_edge_d;
  logic [15:0] status_word;
  logic [15:0] f0_rdata, f1_rdata;
  logic [FW:0] f0_count, f1_count;
  logic        f0_rd, f1_rd;
  logic        f0_empty, f0_full, f0_ovf, f1_empty, f1_full, f1_ovf;
  assign status_word = {synced, lock_err, pps_phase_err, info.fix, info.nsats, 3'b000, err};
  health_fifo #(.WIDTH(16), .DEPTH(FIFO_DEPTH)) u_fifo_status (
    .clk, .rst, .wr(pps_edge_d), .wdata(status_word), .rd(f0_rd), .rdata(f0_rdata),
    .count(f0_count), .empty(f0_empty), .full(f0_full), .overflow(f0_ovf)
  );
  health_fifo #(.WIDTH(16), .DEPTH(FIFO_DEPTH)) u_fifo_tdop (
    .clk, .rst, .wr(pps_edge_d), .wdata(info.tdop), .rd(f1_rd), .rdata(f1_rdata),
    .count(f1_count), .empty(f1_empty), .full(f1_full), .overflow(f1_ovf)
  );

  // GPS configuration strings
  logic          cfg_wr, cfg_send, cfg_busy;
  logic [CW:0]   cfg_fill;
  logic [15:0]   cfg_wdata;
  gps_config_tx #(.CLKS_PER_BIT(CLKS_PER_BIT), .BUF_BYTES(CFG_BYTES)) u_cfg (
    .clk, .rst, .wr_byte(cfg_wr), .wdata(cfg_wdata[7:0]), .send(cfg_send),
    .len(cfg_wdata[CW:0]), .busy(cfg_busy), .fill(cfg_fill), .txd(gps_txd)
  );

  // VME module
  logic [6:0]  reg_addr;
  logic [15:0] reg_wdata, reg_rdata, rd_mux;
  logic [1:0]  reg_be;
  logic        reg_we, reg_re;
  logic [15:0] time_lo_shadow;
  vme_a24d16_slave #(.BASE_ADDR(BASE_ADDR), .ADDR_BITS(7)) u_vme (
    .clk, .rst, .vme_i, .vme_o, .reg_addr, .reg_wdata, .reg_be, .reg_we, .reg_re, .reg_rdata
  );

  assign cfg_wr    = reg_we && reg_addr == CK_CFG_DATA;
  assign cfg_send  = reg_we && reg_addr == CK_CFG_SEND;
  assign cfg_wdata = reg_wdata;
  assign f0_rd     = reg_re && reg_addr == CK_FIFO0;
  assign f1_rd     = reg_re && reg_addr == CK_FIFO1;

  always_comb begin
    unique case (reg_addr)
      CK_CTRL:      rd_mux = {14'h0, interval_20us, ts_enable};
      CK_STATUS:    rd_mux = status_word;
      CK_TIME_HI:   rd_mux = now[31:16];
      CK_TIME_LO:   rd_mux = time_lo_shadow;
      CK_GPS_HHMM:  rd_mux = {info.hh10, info.hh1, info.mm10, info.mm1};
      CK_GPS_SS:    rd_mux = {info.ss10, info.ss1, 2'b00, info.fix, info.nsats};
      CK_TDOP:      rd_mux = info.tdop;
      CK_PHASE:     rd_mux = {8'(pps_dev), 8'(pps_phase)};
      CK_FIFO0:     rd_mux = f0_rdata;
      CK_FIFO0_CNT: rd_mux = {f0_ovf, f0_full, f0_empty, 13'(f0_count)};
      CK_FIFO1:     rd_mux = f1_rdata;
      CK_FIFO1_CNT: rd_mux = {f1_ovf, f1_full, f1_empty, 13'(f1_count)};
      CK_CFG_SEND:  rd_mux = {cfg_busy, 7'h0, 8'(cfg_fill)};
      default:      rd_mux = 16'h0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ts_enable      <= 1'b1;
      interval_20us  <= 1'b0;
      reg_rdata      <= '0;
      time_lo_shadow <= '0;
      pps_edge_d     <= 1'b0;
    end else begin
      pps_edge_d <= pps_edge;
      if (reg_re) begin
        reg_rdata <= rd_mux;
        if (reg_addr == CK_TIME_HI) time_lo_shadow <= now[15:0];
      end
      if (reg_we && reg_addr == CK_CTRL) begin
        if (reg_be[0]) {interval_20us, ts_enable} <= reg_wdata[1:0];
      end
    end
  end
endmodule
