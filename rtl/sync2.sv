// sync2: two-flop synchronizer for asynchronous single-bit inputs (1PPS,
// RS232 line, external trigger, Almost Full, LNE Enable, 10 MHz reference).
// Output lags the input by two clocks. RESET_VAL sets the value held in
// reset. The design's own helper; the document does not describe it.
module sync2 #(
  parameter int   WIDTH     = 1,
  parameter logic RESET_VAL = 1'b0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] meta;
  always_ff @(posedge clk) begin
    if (rst) begin
      meta <= {WIDTH{RESET_VAL}};
      q    <= {WIDTH{RESET_VAL}};
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
