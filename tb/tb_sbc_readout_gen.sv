// tb_sbc_readout_gen: self-checking test of the SBC read-out request: a VME
// request gives one pulse; with auto_en off a rising busy gives none; with
// auto_en on each rising busy gives one pulse and a steady busy no more.
module tb_sbc_readout_gen;
  localparam int W = 4;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic req = 0, auto_en = 0, busy = 0, sbc_readout, d = 0;
  int checks = 0, failures = 0, rises = 0;

  sbc_readout_gen #(.WIDTH(W)) dut (.clk, .rst, .req, .auto_en, .busy, .sbc_readout);
  always @(posedge clk) if (!rst) begin d <= sbc_readout; if (sbc_readout && !d) rises++; end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (5) @(posedge clk);
    @(negedge clk) req = 1;
    @(negedge clk) req = 0;
    repeat (10) @(posedge clk);
    check(rises == 1, "pulse on VME request");
    @(negedge clk) busy = 1;
    repeat (10) @(posedge clk);
    check(rises == 1, "no automatic request when disabled");
    @(negedge clk) busy = 0; auto_en = 1;
    repeat (3) @(negedge clk);
    busy = 1;
    repeat (50) @(posedge clk);
    check(rises == 2, "one automatic request when a TDC becomes almost full");
    @(negedge clk) busy = 0;
    repeat (3) @(negedge clk);
    busy = 1;
    repeat (10) @(posedge clk);
    check(rises == 3, "again on the next rise");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
