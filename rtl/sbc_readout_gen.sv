// sbc_readout_gen: the SBC read-out request signal of the Control card, a
// WIDTH-clock pulse sent to the single board computers. It is issued on a
// request from the VME module or, when auto_en is set, each time the OR of
// the TDC Almost Full signals rises (a TDC has just become almost full).
// The document names this signal, its purpose and the almost-full use as a
// possibility; the pulse width and the auto_en switch are this design's
// choices.
module sbc_readout_gen #(
  parameter int WIDTH = 4
) (
  input  logic clk,
  input  logic rst,
  input  logic req,
  input  logic auto_en,
  input  logic busy,
  output logic sbc_readout
);
  logic busy_d, fire;
  assign fire = req || (auto_en && busy && !busy_d);
  always_ff @(posedge clk) begin
    if (rst) busy_d <= 1'b0;
    else     busy_d <= busy;
  end
  tdc_cmd_pulse #(.WIDTH(WIDTH)) u_pulse (.clk, .rst, .req(fire), .pulse(sbc_readout));
endmodule
