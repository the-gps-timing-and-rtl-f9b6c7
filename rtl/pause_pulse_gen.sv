// pause_pulse_gen: the Pause Pulses output to the scaler system, a
// two-input multiplexer between logic low and the 10 MHz square wave,
// selected by the trigger module's pause state. The output is registered
// from ref10_next so that it is in phase with the 10 MHz reference. The
// ratio of pause pulses to reference pulses counted by the scaler is the
// dead-time fraction imposed by run control. Function from the document;
// the registered output is this design's choice.
module pause_pulse_gen (
  input  logic clk,
  input  logic rst,
  input  logic paused,
  input  logic ref10_next,
  output logic pause_pulses
);
  always_ff @(posedge clk) begin
    if (rst) pause_pulses <= 1'b0;
    else     pause_pulses <= paused && ref10_next;
  end
endmodule
