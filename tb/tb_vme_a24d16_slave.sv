// tb_vme_a24d16_slave: self-checking test of the A24D16 VME slave with a
// small register file (128 words) behind it. Checked: writes reach the
// right register with the right data, reads return it, DTACK* comes within
// the stated 4 (write) / 6 (read) clocks of the strobes being seen, cycles
// to another base address or with a non-A24 address modifier get no DTACK*
// and no register access, and the data lines are driven only during reads.
module tb_vme_a24d16_slave;
  import gtc_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  vme_in_t vme_i = '{as_n: 1, ds_n: 2'b11, write_n: 1, am: 0, addr: 0, data: 0};
  vme_out_t vme_o;
  logic [6:0] reg_addr;
  logic [15:0] reg_wdata, reg_rdata, vme_rdata, rd;
  logic [1:0] reg_be;
  logic reg_we, reg_re;
  int vme_timeouts = 0;
  int checks = 0, failures = 0, n_we = 0, n_re = 0, n_oe_bad = 0;
  logic [15:0] regs [128];
  logic [15:0] model [128];

  vme_a24d16_slave #(.BASE_ADDR(24'h340000), .ADDR_BITS(7)) dut (
    .clk, .rst, .vme_i, .vme_o, .reg_addr, .reg_wdata, .reg_be, .reg_we, .reg_re, .reg_rdata);

  always @(posedge clk) if (!rst) begin
    if (reg_we) begin regs[reg_addr] <= reg_wdata; n_we++; end
    if (reg_re) begin reg_rdata <= regs[reg_addr]; n_re++; end
    if (vme_o.data_oe && !vme_i.write_n) n_oe_bad++;
  end

  `include "vme_master_tasks.svh"

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int to0;
    for (int i = 0; i < 128; i++) begin regs[i] = 0; model[i] = 0; end
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 40; i++) begin
      int a = $urandom_range(0, 127);
      logic [15:0] d = 16'($urandom);
      vme_write(24'h340000 + 24'(2 * a), d);
      model[a] = d;
      check(vme_last_cycles <= 4 && vme_timeouts == 0, $sformatf("write DTACK after %0d", vme_last_cycles));
    end
    check(n_we == 40, "40 register writes");
    n_we = 0;
    for (int a = 0; a < 128; a++) begin
      model[a] = 16'($urandom);
      vme_write(24'h340000 + 24'(2 * a), model[a]);
    end
    for (int a = 127; a >= 0; a -= 3) begin
      vme_read(24'h340000 + 24'(2 * a), rd);
      check(rd == model[a], $sformatf("read %0d: %h expected %h", a, rd, model[a]));
      check(vme_last_cycles <= 6, $sformatf("read DTACK after %0d", vme_last_cycles));
    end
    // another board's address: no response
    to0 = vme_timeouts;
    vme_write(24'h350002, 16'hBEEF);
    check(vme_timeouts == to0 + 1 && n_we == 128, "other base address ignored");
    // A16 address modifier: no response
    vme_cycle(24'h340002, 1'b1, 16'hBEEF, 6'h29);
    check(vme_timeouts == to0 + 2 && n_we == 128, "A16 modifier ignored");
    // supervisory A24 accepted
    vme_cycle(24'h340002, 1'b1, 16'h1234, 6'h3D);
    vme_read(24'h340002, rd);
    check(rd == 16'h1234 && n_we == 129, $sformatf("supervisory A24 access %h %0d", rd, n_we));
    check(n_oe_bad == 0, "data driven only in reads");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
