// tb_ref10_gen: self-checking test of the 10 MHz reference: two clocks
// high, two low at 40 MHz, and ref10_next always equal to the next ref10.
module tb_ref10_gen;
  logic clk = 0, rst = 1;
  always #12.5 clk = ~clk;
  logic ref10, ref10_next, pred = 0;
  int checks = 0, failures = 0, n = 0, highs = 0, rises = 0;
  logic ref_d = 0;

  ref10_gen dut (.clk, .rst, .ref10, .ref10_next);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    @(negedge clk) begin pred = ref10_next; ref_d = ref10; end
    repeat (400) begin
      @(negedge clk);
      check(ref10 == pred, "ref10_next predicts ref10");
      pred = ref10_next;
      highs += int'(ref10);
      rises += int'(ref10 && !ref_d);
      ref_d = ref10;
      n++;
    end
    check(highs == 200, $sformatf("50 %% duty, %0d high of 400", highs));
    check(rises == 100, $sformatf("10 MHz: %0d rises in 400 clocks", rises));
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
