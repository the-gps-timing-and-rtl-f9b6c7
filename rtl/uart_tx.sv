// uart_tx: RS232 transmitter, 8 data bits, no parity, one stop bit, LSB
// first, CLKS_PER_BIT clocks per bit. A byte on data is taken when start is
// high and busy is low; busy stays high until the stop bit has ended. The
// line idles high. The serial format is this design's assumption.
// Lint reports shreg[0] unused: the start bit is loaded with the byte but
// driven from the state counter, so that bit is only shifted out.
module uart_tx #(
  parameter int CLKS_PER_BIT = 8333
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] data,
  input  logic       start,
  output logic       busy,
  output logic       txd
);
  logic [$clog2(CLKS_PER_BIT+1)-1:0] cnt;
  logic [3:0] bitn;      // 0 start, 1..8 data, 9 stop
  logic [8:0] shreg;     // {data, start bit}

  always_ff @(posedge clk) begin
    if (rst) begin
      busy  <= 1'b0;
      txd   <= 1'b1;
      cnt   <= '0;
      bitn  <= '0;
      shreg <= '1;
    end else if (!busy) begin
      txd <= 1'b1;
      if (start) begin
        busy  <= 1'b1;
        shreg <= {data, 1'b0};
        txd   <= 1'b0;
        cnt   <= '0;
        bitn  <= '0;
      end
    end else if (cnt == ($bits(cnt))'(CLKS_PER_BIT - 1)) begin
      cnt <= '0;
      if (bitn == 4'd9) begin
        busy <= 1'b0;
        txd  <= 1'b1;
      end else begin
        bitn  <= bitn + 1'b1;
        shreg <= {1'b1, shreg[8:1]};
        txd   <= (bitn == 4'd8) ? 1'b1 : shreg[1];
      end
    end else cnt <= cnt + 1'b1;
  end
endmodule
