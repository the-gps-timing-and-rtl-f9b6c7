// tb_lne_gen: self-checking test of the Load Next Event generator with its
// default 200,000-clock half period at 40 MHz: LNE runs at 100 Hz with a
// 50 % duty cycle only while both enables are high, and is low otherwise.
module tb_lne_gen;
  logic clk = 0, rst = 1;
  always #12.5 clk = ~clk;
  logic vme_en = 1, lne_enable = 0, lne;
  int checks = 0, failures = 0;
  longint cyc = 0, last_rise = -1, period = -1, high = 0, last_high = 0, n_rise = 0;
  logic lne_d = 0;

  lne_gen dut (.clk, .rst, .vme_en, .lne_enable, .lne);

  always @(posedge clk) if (!rst) begin
    cyc++;
    lne_d <= lne;
    if (lne && !lne_d) begin
      period = (last_rise < 0) ? -1 : cyc - last_rise;
      last_rise = cyc; n_rise++; high = 1;
    end else if (lne) high++;
    if (!lne && lne_d) last_high = high;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (500_000) @(posedge clk);
    check(n_rise == 0 && !lne, "off without LNE Enable");
    @(negedge clk) lne_enable = 1;
    repeat (1_300_000) @(posedge clk);
    check(n_rise == 4, $sformatf("rises %0d", n_rise));
    check(period == 400_000, $sformatf("100 Hz: period %0d clocks", period));
    check(last_high == 200_000, $sformatf("50 %% duty: high %0d clocks", last_high));
    @(negedge clk) vme_en = 0;
    @(negedge clk);
    check(!lne, "off when disabled by VME");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
