// trigger_module: source of the TRG signal on the TDC control bus.
// Three modes, selected through the VME module:
//   TRIG_PAUSE     no triggers; paused is high (drives the Pause Pulses)
//   TRIG_PERIODIC  a trigger every period clocks (1000 clocks of 40 MHz =
//                  40 kHz, the rate of a normal data run); the first comes
//                  period clocks after entering the mode
//   TRIG_EXTERNAL  a trigger on each rising edge of the (synchronized)
//                  external trigger input
// Each trigger is a TRG_WIDTH-clock high pulse; an external edge that
// arrives while a pulse is still high is ignored, and trig_count counts the
// pulses issued. The three modes, the multiplexer between the adjustable
// periodic trigger and the external trigger, and 40 kHz follow the
// document; the pulse width, the period in clocks and the trigger counter
// are this design's choices.
module trigger_module
  import gtc_pkg::*;
#(
  parameter int TRG_WIDTH = 4,
  parameter int PW        = 32
) (
  input  logic          clk,
  input  logic          rst,
  input  trig_mode_e    mode,
  input  logic [PW-1:0] period,     // clocks between periodic triggers
  input  logic          ext_trig,   // synchronized external trigger level
  output logic          trg,
  output logic          paused,
  output logic [31:0]   trig_count
);
  localparam int WW = $clog2(TRG_WIDTH + 1);
  logic [PW-1:0] pcnt;
  logic [WW-1:0] wcnt;
  logic          ext_d;
  trig_mode_e    mode_d;
  logic          fire;

  always_comb begin
    unique case (mode)
      TRIG_PERIODIC: fire = (mode_d == TRIG_PERIODIC) && (pcnt + 1'b1 >= period) && (period != '0);
      TRIG_EXTERNAL: fire = ext_trig && !ext_d && !trg;
      default:       fire = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pcnt       <= '0;
      wcnt       <= '0;
      trg        <= 1'b0;
      ext_d      <= 1'b0;
      mode_d     <= TRIG_PAUSE;
      paused     <= 1'b1;
      trig_count <= '0;
    end else begin
      ext_d  <= ext_trig;
      mode_d <= mode;
      paused <= (mode == TRIG_PAUSE);
      if (mode != TRIG_PERIODIC || mode_d != TRIG_PERIODIC || fire) pcnt <= '0;
      else pcnt <= pcnt + 1'b1;
      if (fire) begin
        trg        <= 1'b1;
        wcnt       <= WW'(TRG_WIDTH - 1);
        trig_count <= trig_count + 1'b1;
      end else if (wcnt != '0) begin
        wcnt <= wcnt - 1'b1;
      end else begin
        trg <= 1'b0;
      end
    end
  end
endmodule
