// timestamp_encoder: turns the internal clock into the 32-channel pulse
// pattern the TDC records.
//
// When the microsecond digit of the clock becomes 0 (every 10 us, or every
// 20 us when interval_20us is set, i.e. also requiring an even 10 us digit),
// the encoder latches a 32-bit word: the 7 BCD digits ss:mmm:uu (tens of
// seconds in bits 31:28 down to tens of microseconds in bits 7:4) and the
// 4-bit error code (bit 0 = error 1 ... bit 3 = error 4). All 32 outputs go
// high together on the next clock; a channel carrying 0 falls after
// CLK_PER_US clocks (1 us) and a channel carrying 1 after 2*CLK_PER_US
// clocks (2 us). Pulses are needed because the TDC records edges, not
// levels. word and sent report the latched word and its start.
// The digit order, the pulse widths, the 10/20 us choice and the "microsecond
// digit is 0" rule follow the document; the assignment of bits to channels
// is this design's own choice.
module timestamp_encoder
  import gtc_pkg::*;
#(
  parameter int CLK_PER_US = 40
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        enable,
  input  logic        interval_20us,
  input  bcd_time_t   now,
  input  logic        tick,
  input  ts_err_t     err,
  output logic [31:0] ts_out,   // one pulse per channel
  output logic [31:0] word,     // word being sent
  output logic        sent      // one-clock pulse when a word starts
);
  localparam int CW = $clog2(2 * CLK_PER_US + 1);
  logic [CW-1:0] cnt;
  logic          active;
  logic          start;

  assign start = enable && tick && (now.us1 == 4'd0) && (!interval_20us || !now.us10[0]);

  always_ff @(posedge clk) begin
    sent <= 1'b0;
    if (rst) begin
      cnt    <= '0;
      active <= 1'b0;
      ts_out <= '0;
      word   <= '0;
    end else if (start) begin
      word   <= {now[31:4], err};
      cnt    <= '0;
      active <= 1'b1;
      ts_out <= '1;
      sent   <= 1'b1;
    end else if (active) begin
      cnt <= cnt + 1'b1;
      if (cnt + 1'b1 == CW'(CLK_PER_US)) ts_out <= ts_out & word;
      if (cnt + 1'b1 == CW'(2 * CLK_PER_US)) begin
        ts_out <= '0;
        active <= 1'b0;
      end
    end
  end
endmodule
