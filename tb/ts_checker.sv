// ts_checker: test-bench decoder for the 32 timestamp channels. It measures
// every channel's pulse width (2 us = 1, 1 us = 0), rebuilds the word, and
// compares the time field with the GPS receiver model: the seconds must
// equal the receiver's second and the sub-second part must equal the 10 us
// periods elapsed since the receiver's last 1PPS (or one less, for the
// synchronizer and start latency). Trains within 100 us of a 1PPS are only
// counted. Also counts the spacing of consecutive trains.
module ts_checker #(
  parameter int CLK_PER_US = 40
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] ts_out,
  input  longint      cyc,          // model clock count
  input  longint      pps_cycle,    // model clock count at its last 1PPS
  input  int          gps_ss,       // model second
  input  logic        compare       // compare times (after synchronization)
);
  localparam int CPU = CLK_PER_US;
  localparam longint SEC = longint'(CPU) * 1_000_000;
  int width [32];
  logic [31:0] prev = 0, got = 0;
  longint rise_cyc = 0, last_rise = -1;
  int n_trains = 0, n_good = 0, n_bad = 0, n_err_bits = 0, n_sp10 = 0, n_sp20 = 0;
  logic [3:0] last_err = 0;
  int exp_sub, got_sub;

  always @(posedge clk) if (!rst) begin
    prev <= ts_out;
    if (ts_out != 0 && prev == 0) begin
      rise_cyc = cyc;
      if (last_rise >= 0 && rise_cyc - last_rise == 10 * CPU) n_sp10++;
      if (last_rise >= 0 && rise_cyc - last_rise == 20 * CPU) n_sp20++;
      last_rise = rise_cyc;
      for (int i = 0; i < 32; i++) width[i] = 0;
    end
    for (int i = 0; i < 32; i++) if (ts_out[i]) width[i]++;
    if (ts_out == 0 && prev != 0) begin
      for (int i = 0; i < 32; i++) got[i] = (width[i] == 2 * CPU);
      n_trains++;
      last_err = got[3:0];
      if (got[3:0] != 0) n_err_bits++;
      if (compare && rise_cyc - pps_cycle > 100 * CPU && SEC - (rise_cyc - pps_cycle) > 100 * CPU) begin
        exp_sub = int'((rise_cyc - pps_cycle) / (10 * CPU));
        got_sub = 10000 * int'(got[23:20]) + 1000 * int'(got[19:16]) + 100 * int'(got[15:12]) +
                  10 * int'(got[11:8]) + int'(got[7:4]);
        if (10 * int'(got[31:28]) + int'(got[27:24]) == gps_ss && got_sub <= exp_sub && exp_sub - got_sub <= 1)
          n_good++;
        else begin
          n_bad++;
          if (n_bad < 5) $display("bad timestamp %h: expected ss %0d sub %0d", got, gps_ss, exp_sub);
        end
      end
    end
  end
endmodule
