// uart_rx: RS232 receiver, 8 data bits, no parity, one stop bit, LSB first.
// The line (already synchronized, idle high) is sampled in the middle of
// each bit; CLKS_PER_BIT is the 40 MHz clock count per bit (4800 baud by
// default, the NMEA 0183 rate). A received byte is presented on data with
// a one-clock valid pulse; frame_err pulses instead when the stop bit is low.
// The serial format is this design's assumption: the document says only that
// the receiver sends its strings "via the RS232 protocol".
module uart_rx #(
  parameter int CLKS_PER_BIT = 8333
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid,
  output logic       frame_err
);
  typedef enum logic [1:0] {S_IDLE, S_START, S_DATA, S_STOP} state_e;
  state_e state;
  logic [$clog2(CLKS_PER_BIT+1)-1:0] cnt;
  logic [2:0] bitn;
  logic [7:0] shreg;

  always_ff @(posedge clk) begin
    valid     <= 1'b0;
    frame_err <= 1'b0;
    if (rst) begin
      state <= S_IDLE;
      cnt   <= '0;
      bitn  <= '0;
      shreg <= '0;
      data  <= '0;
    end else begin
      case (state)
        S_IDLE: if (!rxd) begin
          state <= S_START;
          cnt   <= '0;
        end
        S_START: begin
          if (cnt == ($bits(cnt))'(CLKS_PER_BIT/2 - 1)) begin
            cnt   <= '0;
            bitn  <= '0;
            state <= rxd ? S_IDLE : S_DATA;  // glitch rejection
          end else cnt <= cnt + 1'b1;
        end
        S_DATA: begin
          if (cnt == ($bits(cnt))'(CLKS_PER_BIT - 1)) begin
            cnt   <= '0;
            shreg <= {rxd, shreg[7:1]};
            if (bitn == 3'd7) state <= S_STOP;
            bitn <= bitn + 1'b1;
          end else cnt <= cnt + 1'b1;
        end
        S_STOP: begin
          if (cnt == ($bits(cnt))'(CLKS_PER_BIT - 1)) begin
            cnt   <= '0;
            state <= S_IDLE;
            if (rxd) begin
              data  <= shreg;
              valid <= 1'b1;
            end else frame_err <= 1'b1;
          end else cnt <= cnt + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
