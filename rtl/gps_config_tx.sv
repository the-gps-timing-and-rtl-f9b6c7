// gps_config_tx: the GPS configuration string sender of the Clock card.
// The control computer writes the text of a configuration string (for
// instance the NMEA commands that select which sentences the receiver
// sends) byte by byte into a BUF_BYTES buffer, then writes the byte count
// to start transmission. The bytes leave on the RS232 line to the receiver,
// first byte first; busy is high until the last stop bit, after which the
// buffer write pointer returns to 0 for the next string. Writes while busy
// and a start with a count of 0 are ignored.
// The document shows this block and its VME and RS232 connections but not
// its insides; the buffer and the start-by-count protocol are this
// design's choices.
module gps_config_tx #(
  parameter int CLKS_PER_BIT = 8333,
  parameter int BUF_BYTES    = 128
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       wr_byte,      // append wdata to the buffer
  input  logic [7:0] wdata,
  input  logic       send,         // send the first len bytes
  input  logic [$clog2(BUF_BYTES):0] len,
  output logic       busy,
  output logic [$clog2(BUF_BYTES):0] fill,  // bytes written so far
  output logic       txd
);
  localparam int AW = $clog2(BUF_BYTES);
  logic [7:0]  buffer [BUF_BYTES];
  logic [AW:0] remaining;
  logic [AW-1:0] rp;
  logic        tx_start, tx_busy, tx_busy_d, sending, waiting;

  always_ff @(posedge clk) begin
    if (wr_byte && !busy && fill < (AW+1)'(BUF_BYTES)) buffer[fill[AW-1:0]] <= wdata;
  end

  assign busy = sending;

  always_ff @(posedge clk) begin
    tx_start <= 1'b0;
    if (rst) begin
      fill      <= '0;
      remaining <= '0;
      rp        <= '0;
      sending   <= 1'b0;
      waiting   <= 1'b0;
      tx_busy_d <= 1'b0;
    end else begin
      tx_busy_d <= tx_busy;
      if (!sending) begin
        if (wr_byte && fill < (AW+1)'(BUF_BYTES)) fill <= fill + 1'b1;
        if (send && len != '0) begin
          sending   <= 1'b1;
          remaining <= (len > (AW+1)'(BUF_BYTES)) ? (AW+1)'(BUF_BYTES) : len;
          rp        <= '0;
          waiting   <= 1'b0;
        end
      end else if (!waiting && !tx_busy) begin
        // hand the next byte to the transmitter
        tx_start  <= 1'b1;
        waiting   <= 1'b1;
      end else if (waiting && tx_busy_d && !tx_busy) begin
        // byte finished
        waiting   <= 1'b0;
        rp        <= rp + 1'b1;
        remaining <= remaining - 1'b1;
        if (remaining == (AW+1)'(1)) begin
          sending <= 1'b0;
          fill    <= '0;
        end
      end
    end
  end

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst, .data(buffer[rp]), .start(tx_start), .busy(tx_busy), .txd
  );
endmodule
