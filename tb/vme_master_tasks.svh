// vme_master_tasks.svh: A24D16 VME master bus cycles for testbenches.
// Included inside a testbench module that declares clk, vme_i (vme_in_t),
// vme_o (vme_out_t), int vme_timeouts and a 16-bit vme_rdata. A cycle
// drives address, address modifier, WRITE* and data, asserts AS* and both
// data strobes, waits for DTACK* (at most 100 clocks, else counts a
// time-out), takes the read data, releases the strobes and waits for DTACK*
// to be released. vme_last_cycles reports the clocks from strobe to DTACK*.
int vme_last_cycles;

task automatic vme_cycle(input logic [23:0] addr, input logic wr, input logic [15:0] wdata,
                         input logic [5:0] am = 6'h39);
  int n = 0;
  @(negedge clk);
  vme_i.addr    = addr[23:1];
  vme_i.am      = am;
  vme_i.write_n = !wr;
  vme_i.data    = wr ? wdata : 16'h0;
  @(negedge clk);
  vme_i.as_n = 1'b0;
  vme_i.ds_n = 2'b00;
  while (!(vme_o.dtack_oe && !vme_o.dtack_n) && n < 100) begin
    @(negedge clk);
    n++;
  end
  vme_last_cycles = n;
  if (n >= 100) vme_timeouts++;
  if (!wr) vme_rdata = vme_o.data_oe ? vme_o.data : 16'hxxxx;
  vme_i.as_n = 1'b1;
  vme_i.ds_n = 2'b11;
  n = 0;
  while (vme_o.dtack_oe && n < 100) begin
    @(negedge clk);
    n++;
  end
endtask

task automatic vme_write(input logic [23:0] addr, input logic [15:0] data);
  vme_cycle(addr, 1'b1, data);
endtask

task automatic vme_read(input logic [23:0] addr, output logic [15:0] data);
  vme_cycle(addr, 1'b0, 16'h0);
  data = vme_rdata;
endtask
