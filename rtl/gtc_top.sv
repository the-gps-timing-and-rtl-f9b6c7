// gtc_top: the GPS Timing and Control system. The Clock card firmware keeps
// a GPS-disciplined clock and sends 32-channel timestamp pulses to a TDC;
// the Control card firmware drives the TDC control bus (TRG, CLR, CRST) and
// the scaler signals (LNE, 10 MHz reference, Pause and Busy pulses). Both
// run on the 40 MHz global clock that the Clock card's PLL derives from the
// GPS receiver's 10 MHz output; that PLL is outside the logic, so the clock
// enters here as clk_40m. Both cards share one VME bus at different base
// addresses (Clock card CLOCK_BASE, Control card CONTROL_BASE); their data
// and DTACK drivers are merged as the open bus would merge them. Level
// shifting and fan-out to the TDCs (the CB_Fan cards) happen outside.
module gtc_top
  import gtc_pkg::*;
#(
  parameter logic [23:0] CLOCK_BASE   = 24'h100000,
  parameter logic [23:0] CONTROL_BASE = 24'h200000,
  parameter int          N_AF         = 24,
  // clock-rate dependent sizes, given for the 40 MHz global clock
  parameter int          CLK_PER_US   = 40,          // 40 MHz / 1 MHz
  parameter int          CLKS_PER_BIT = 8333,        // 40 MHz / 4800 baud
  parameter int          PPS_TIMEOUT  = 60_000_000,  // 1.5 s without 1PPS
  parameter int          FIFO_DEPTH   = 256,
  parameter logic [31:0] TRIG_PERIOD  = 32'd1000,    // 40 kHz
  parameter int          LNE_HALF     = 200_000      // 100 Hz
) (
  input  logic            clk_40m,
  input  logic            rst,
  // GPS receiver
  input  logic            gps_rxd,
  output logic            gps_txd,
  input  logic            pps_in,
  input  logic            ref10_in,
  // VME bus
  input  vme_in_t         vme_i,
  output vme_out_t        vme_o,
  // timestamp channels to the TDC
  output logic [31:0]     ts_out,
  // TDC control bus and scaler system
  input  logic            ext_trig_in,
  input  logic            lne_enable_in,
  input  logic [N_AF-1:0] almost_full,
  output logic            trg,
  output logic            clr,
  output logic            crst,
  output logic            lne,
  output logic            ref10_out,
  output logic            pause_pulses,
  output logic            busy_pulses,
  output logic            sbc_readout,
  // monitoring
  output logic [31:0]     ts_word,
  output logic            ts_sent,
  output bcd_time_t       now,
  output ts_err_t         err,
  output logic [31:0]     trig_count
);
  vme_out_t vme_ck, vme_ct;

  hclock_clock_fw #(
    .BASE_ADDR(CLOCK_BASE), .CLK_PER_US(CLK_PER_US), .CLKS_PER_BIT(CLKS_PER_BIT),
    .PPS_TIMEOUT(PPS_TIMEOUT), .FIFO_DEPTH(FIFO_DEPTH)
  ) u_clock_card (
    .clk(clk_40m), .rst, .gps_rxd, .gps_txd, .pps_in, .ref10_in,
    .vme_i, .vme_o(vme_ck), .ts_out, .ts_word, .ts_sent, .now, .err
  );

  hclock_control_fw #(
    .BASE_ADDR(CONTROL_BASE), .N_AF(N_AF), .DEFAULT_PERIOD(TRIG_PERIOD), .LNE_HALF(LNE_HALF)
  ) u_control_card (
    .clk(clk_40m), .rst, .vme_i, .vme_o(vme_ct), .ext_trig_in, .lne_enable_in,
    .almost_full, .trg, .clr, .crst, .lne, .ref10(ref10_out), .pause_pulses,
    .busy_pulses, .sbc_readout, .trig_count
  );

  always_comb begin
    vme_o.data     = (vme_ck.data_oe ? vme_ck.data : 16'h0) | (vme_ct.data_oe ? vme_ct.data : 16'h0);
    vme_o.data_oe  = vme_ck.data_oe | vme_ct.data_oe;
    vme_o.dtack_n  = (vme_ck.dtack_oe ? vme_ck.dtack_n : 1'b1) & (vme_ct.dtack_oe ? vme_ct.dtack_n : 1'b1);
    vme_o.dtack_oe = vme_ck.dtack_oe | vme_ct.dtack_oe;
  end
endmodule
