// lne_gen: Load Next Event, the 100 Hz clock that starts each read-out of
// the scaler system. A counter divides the 40 MHz clock by 2*HALF_PERIOD
// (200,000 clocks high, 200,000 low = 100 Hz). It runs only while both the
// VME enable and the scaler's LNE Enable input (synchronized) are high;
// otherwise the output is low and the next enabled period starts with a
// full high half. The 100 Hz rate and the LNE Enable input follow the
// document; the 50 % duty cycle and the VME enable are this design's
// choices.
module lne_gen #(
  parameter int HALF_PERIOD = 200_000
) (
  input  logic clk,
  input  logic rst,
  input  logic vme_en,
  input  logic lne_enable,   // synchronized LNE Enable from the scaler
  output logic lne
);
  localparam int CW = $clog2(HALF_PERIOD);
  logic [CW-1:0] cnt;
  logic          phase;
  always_ff @(posedge clk) begin
    if (rst || !(vme_en && lne_enable)) begin
      cnt   <= '0;
      phase <= 1'b0;
      lne   <= 1'b0;
    end else begin
      lne <= !phase;
      if (cnt == CW'(HALF_PERIOD - 1)) begin
        cnt   <= '0;
        phase <= !phase;
      end else cnt <= cnt + 1'b1;
    end
  end
endmodule
