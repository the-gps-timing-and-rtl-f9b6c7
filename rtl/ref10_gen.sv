// ref10_gen: the 10 MHz reference for the scaler system, a continuous
// square wave made by dividing the 40 MHz clock by four (two clocks high,
// two low). ref10_next is the value ref10 takes on the next clock, so that
// the Pause and Busy pulse modules can register their gated copies and stay
// in phase with ref10. The document gives the 10 MHz square wave; the
// divider is this design's choice.
module ref10_gen (
  input  logic clk,
  input  logic rst,
  output logic ref10,
  output logic ref10_next
);
  logic [1:0] cnt;
  assign ref10_next = !cnt[1];
  always_ff @(posedge clk) begin
    if (rst) begin
      cnt   <= '0;
      ref10 <= 1'b0;
    end else begin
      cnt   <= cnt + 1'b1;
      ref10 <= ref10_next;
    end
  end
endmodule
