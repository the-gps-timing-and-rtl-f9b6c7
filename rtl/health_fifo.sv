// health_fifo: synchronous first-in first-out buffer for the GPS health
// words the Clock card records once per second, read by the control
// computer over VME. A write when full is dropped and counted in overflow
// (sticky until reset); a read when empty is ignored. rdata is
// the word at the head (first-word fall-through), and a read pops it.
// The document names health-monitoring FIFOs; their depth, width and
// overflow policy are this design's own choices.
module health_fifo #(
  parameter int WIDTH = 16,
  parameter int DEPTH = 256
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             rd,
  output logic [WIDTH-1:0] rdata,
  output logic [$clog2(DEPTH):0] count,
  output logic             empty,
  output logic             full,
  output logic             overflow
);
  localparam int AW = $clog2(DEPTH);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic             do_wr, do_rd;

  assign empty = (count == '0);
  assign full  = (count == (AW+1)'(DEPTH));
  assign do_wr = wr && !full;
  assign do_rd = rd && !empty;
  assign rdata = mem[rp];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp       <= '0;
      rp       <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_wr) wp <= wp + 1'b1;
      if (do_rd) rp <= rp + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
      if (wr && full) overflow <= 1'b1;
    end
  end

  a_count_in_range: assert property (@(posedge clk) disable iff (rst) count <= (AW+1)'(DEPTH));
endmodule
