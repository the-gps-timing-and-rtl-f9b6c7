// busy_pulse_gen: the Busy Pulses output to the scaler system. The N_AF
// Almost Full signals of the TDCs are synchronized and ORed; while any is
// high the output follows the 10 MHz square wave (registered from
// ref10_next, in phase with the reference), otherwise it stays low. busy
// reports the OR. The scaler's count ratio of busy pulses to reference
// pulses is the fraction of time a TDC was almost full. Function from the
// document; the synchronizers are this design's choice.
module busy_pulse_gen #(
  parameter int N_AF = 24
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [N_AF-1:0] almost_full,   // asynchronous, from the TDCs
  input  logic            ref10_next,
  output logic            busy_pulses,
  output logic            busy,
  output logic [N_AF-1:0] af_sync
);
  sync2 #(.WIDTH(N_AF)) u_sync (.clk, .rst, .d(almost_full), .q(af_sync));
  assign busy = |af_sync;
  always_ff @(posedge clk) begin
    if (rst) busy_pulses <= 1'b0;
    else     busy_pulses <= busy && ref10_next;
  end
endmodule
