// phase_monitor: health monitor of the two GPS reference signals.
//
// 1PPS-10MHz phase: a counter runs modulo CLK_PER_US on the 40 MHz clock
// (which is phase locked to the receiver's 10 MHz), so its value at a 1PPS
// edge is the 1PPS phase in 25 ns steps. The first 1PPS after reset or
// after the internal clock is re-phased (rephase) sets the reference
// phase; at each later 1PPS the deviation from it is reported, and
// pps_phase_err is raised for the next second when it exceeds
// MAX_DEV_CLKS clocks (2 x 25 ns = 50 ns).
//
// 40MHz-10MHz lock: the digitized 10 MHz reference (synchronized) must rise
// exactly every CLK_PER_REF clocks. A rising edge at any other distance, or
// no edge within 2*CLK_PER_REF clocks, is a phase slip (counted from the
// second edge after reset, as the first may be an artefact of the reset); lock_err reports
// whether a slip happened during the previous second.
// Both flags follow the document's error flags; how they are measured
// (counter phase, edge spacing), and that both are updated once per 1PPS,
// are this design's choices. Sampling at 40 MHz resolves 25 ns, not the
// 5 ns threshold the document quotes for the 40/10 MHz flag.
module phase_monitor #(
  parameter int CLK_PER_US   = 40,
  parameter int CLK_PER_REF  = 4,
  parameter int MAX_DEV_CLKS = 2
) (
  input  logic clk,
  input  logic rst,
  input  logic pps_edge,     // one-clock pulse on 1PPS rising edge
  input  logic rephase,      // internal clock was re-phased
  input  logic ref10,        // synchronized 10 MHz reference
  output logic [$clog2(CLK_PER_US)-1:0] pps_phase,   // phase at last 1PPS
  output logic signed [$clog2(CLK_PER_US):0] pps_dev, // deviation, clocks
  output logic pps_phase_err,
  output logic lock_err
);
  localparam int PW = $clog2(CLK_PER_US);
  localparam int RW = $clog2(2 * CLK_PER_REF + 1);

  logic [PW-1:0] ph, ref_phase;
  logic          ref_valid;
  logic signed [PW:0] dev;
  logic          ref_d;
  logic [RW-1:0] gap;
  logic          slip_seen, slip, armed, seen_edge;

  always_comb begin
    dev = $signed({1'b0, ph}) - $signed({1'b0, ref_phase});
    if (dev > $signed((PW+1)'(CLK_PER_US / 2)))       dev = dev - $signed((PW+1)'(CLK_PER_US));
    else if (dev < -$signed((PW+1)'(CLK_PER_US / 2))) dev = dev + $signed((PW+1)'(CLK_PER_US));
    slip = armed && ((ref10 && !ref_d && gap != RW'(CLK_PER_REF - 1)) || (gap == RW'(2 * CLK_PER_REF)));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ph            <= '0;
      ref_phase     <= '0;
      ref_valid     <= 1'b0;
      pps_phase     <= '0;
      pps_dev       <= '0;
      pps_phase_err <= 1'b0;
      ref_d         <= 1'b0;
      armed         <= 1'b0;
      seen_edge     <= 1'b0;
      gap           <= '0;
      slip_seen     <= 1'b0;
      lock_err      <= 1'b0;
    end else begin
      ph    <= (ph == PW'(CLK_PER_US - 1)) ? '0 : ph + 1'b1;
      ref_d <= ref10;
      if (ref10 && !ref_d) begin
        seen_edge <= 1'b1;
        armed     <= seen_edge;
      end
      if (ref10 && !ref_d)              gap <= '0;
      else if (gap != RW'(2 * CLK_PER_REF)) gap <= gap + 1'b1;
      else                              gap <= '0;

      if (rephase) ref_valid <= 1'b0;
      if (slip) slip_seen <= 1'b1;

      if (pps_edge) begin
        pps_phase <= ph;
        lock_err  <= slip_seen || slip;
        slip_seen <= 1'b0;
        if (!ref_valid || rephase) begin
          ref_phase     <= ph;
          ref_valid     <= 1'b1;
          pps_dev       <= '0;
          pps_phase_err <= 1'b0;
        end else begin
          pps_dev       <= dev;
          pps_phase_err <= (dev > $signed((PW+1)'(MAX_DEV_CLKS))) ||
                           (dev < -$signed((PW+1)'(MAX_DEV_CLKS)));
        end
      end
    end
  end
endmodule
