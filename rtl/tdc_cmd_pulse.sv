// tdc_cmd_pulse: the CLR and CRST modules of the Control card. A request
// from the VME module (one clock) produces a WIDTH-clock high pulse on the
// TDC control bus signal, one clock later; a request during a pulse
// restarts it. CLR clears the TDC output buffer, event counter and bunch
// counter and performs a global reset; CRST resets the extended trigger
// time tag and the bunch counter. Both are issued at the start of a run.
// The document describes what the signals do; the pulse width is this
// design's choice.
module tdc_cmd_pulse #(
  parameter int WIDTH = 4
) (
  input  logic clk,
  input  logic rst,
  input  logic req,
  output logic pulse
);
  logic [$clog2(WIDTH+1)-1:0] cnt;
  always_ff @(posedge clk) begin
    if (rst) begin
      cnt   <= '0;
      pulse <= 1'b0;
    end else if (req) begin
      cnt   <= ($bits(cnt))'(WIDTH - 1);
      pulse <= 1'b1;
    end else if (cnt != '0) begin
      cnt <= cnt - 1'b1;
    end else begin
      pulse <= 1'b0;
    end
  end
endmodule
