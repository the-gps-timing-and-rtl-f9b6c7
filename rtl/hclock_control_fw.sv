// hclock_control_fw: firmware of the Control type HClock card. Its modules
// work side by side and are coordinated only through the VME register file
// (gtc_pkg CT_*):
//   trigger_module   TRG to the TDCs (pause / periodic / external)
//   tdc_cmd_pulse x2 CLR and CRST to the TDCs on VME command
//   lne_gen          100 Hz Load Next Event to the scaler system
//   ref10_gen        10 MHz reference to the scaler system
//   pause_pulse_gen  10 MHz while the trigger is paused
//   busy_pulse_gen   10 MHz while any TDC is almost full
//   sbc_readout_gen  read-out request to the single board computers
// The external trigger and LNE Enable inputs are synchronized with two
// flops. After reset the trigger is paused with a 40 kHz period loaded,
// LNE is enabled and the automatic SBC read-out request is off.
// Registers are written as whole 16-bit words, so the VME byte enables are
// left unused (lint reports reg_be).
// The set of modules follows the document's Control firmware; the register
// map and the reset defaults are this design's choices.
module hclock_control_fw
  import gtc_pkg::*;
#(
  parameter logic [23:0] BASE_ADDR      = 24'h200000,
  parameter int          N_AF           = 24,
  parameter logic [31:0] DEFAULT_PERIOD = 32'd1000,    // 40 kHz at 40 MHz
  parameter int          LNE_HALF       = 200_000,     // 100 Hz at 40 MHz
  parameter int          PULSE_WIDTH    = 4
) (
  input  logic            clk,
  input  logic            rst,
  input  vme_in_t         vme_i,
  output vme_out_t        vme_o,
  input  logic            ext_trig_in,
  input  logic            lne_enable_in,
  input  logic [N_AF-1:0] almost_full,
  output logic            trg,
  output logic            clr,
  output logic            crst,
  output logic            lne,
  output logic            ref10,
  output logic            pause_pulses,
  output logic            busy_pulses,
  output logic            sbc_readout,
  output logic [31:0]     trig_count
);
  logic ext_s, lne_en_s;
  sync2 #(.WIDTH(2)) u_sync (.clk, .rst, .d({ext_trig_in, lne_enable_in}), .q({ext_s, lne_en_s}));

  // registers
  trig_mode_e  mode;
  logic [31:0] period;
  logic        lne_vme_en, sbc_auto;
  logic        clr_req, crst_req, sbc_req;

  // trigger
  logic paused;
  trigger_module #(.TRG_WIDTH(PULSE_WIDTH)) u_trig (
    .clk, .rst, .mode, .period, .ext_trig(ext_s), .trg, .paused, .trig_count
  );

  // CLR and CRST
  tdc_cmd_pulse #(.WIDTH(PULSE_WIDTH)) u_clr  (.clk, .rst, .req(clr_req),  .pulse(clr));
  tdc_cmd_pulse #(.WIDTH(PULSE_WIDTH)) u_crst (.clk, .rst, .req(crst_req), .pulse(crst));

  // scaler signals
  logic ref10_next, busy;
  logic [N_AF-1:0] af_sync;
  lne_gen #(.HALF_PERIOD(LNE_HALF)) u_lne (.clk, .rst, .vme_en(lne_vme_en), .lne_enable(lne_en_s), .lne);
  ref10_gen u_ref (.clk, .rst, .ref10, .ref10_next);
  pause_pulse_gen u_pause (.clk, .rst, .paused, .ref10_next, .pause_pulses);
  busy_pulse_gen #(.N_AF(N_AF)) u_busy (
    .clk, .rst, .almost_full, .ref10_next, .busy_pulses, .busy, .af_sync
  );
  sbc_readout_gen #(.WIDTH(PULSE_WIDTH)) u_sbc (
    .clk, .rst, .req(sbc_req), .auto_en(sbc_auto), .busy, .sbc_readout
  );

  // VME module
  logic [6:0]  reg_addr;
  logic [15:0] reg_wdata, reg_rdata, rd_mux;
  logic [1:0]  reg_be;
  logic        reg_we, reg_re;
  logic [31:0] af_wide;
  vme_a24d16_slave #(.BASE_ADDR(BASE_ADDR), .ADDR_BITS(7)) u_vme (
    .clk, .rst, .vme_i, .vme_o, .reg_addr, .reg_wdata, .reg_be, .reg_we, .reg_re, .reg_rdata
  );

  assign af_wide  = 32'(af_sync);
  assign clr_req  = reg_we && reg_addr == CT_CMD && reg_wdata[0];
  assign crst_req = reg_we && reg_addr == CT_CMD && reg_wdata[1];
  assign sbc_req  = reg_we && reg_addr == CT_CMD && reg_wdata[2];

  always_comb begin
    unique case (reg_addr)
      CT_CTRL:      rd_mux = {10'h0, sbc_auto, lne_vme_en, 2'b00, mode};
      CT_PERIOD_LO: rd_mux = period[15:0];
      CT_PERIOD_HI: rd_mux = period[31:16];
      CT_STATUS:    rd_mux = {13'h0, lne_en_s, busy, paused};
      CT_AF_LO:     rd_mux = af_wide[15:0];
      CT_AF_HI:     rd_mux = af_wide[31:16];
      default:      rd_mux = 16'h0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      mode       <= TRIG_PAUSE;
      period     <= DEFAULT_PERIOD;
      lne_vme_en <= 1'b1;
      sbc_auto   <= 1'b0;
      reg_rdata  <= '0;
    end else begin
      if (reg_re) reg_rdata <= rd_mux;
      if (reg_we) begin
        unique case (reg_addr)
          CT_CTRL: begin
            mode       <= (reg_wdata[1:0] == 2'd3) ? TRIG_PAUSE : trig_mode_e'(reg_wdata[1:0]);
            lne_vme_en <= reg_wdata[4];
            sbc_auto   <= reg_wdata[5];
          end
          CT_PERIOD_LO: period[15:0]  <= reg_wdata;
          CT_PERIOD_HI: period[31:16] <= reg_wdata;
          default: ;
        endcase
      end
    end
  end
endmodule
