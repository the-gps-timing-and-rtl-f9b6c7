// tb_health_fifo: self-checking test of the health FIFO (depth 8 here).
// Writes and reads are compared with a queue model: order, count, empty
// and full flags, dropped writes when full with the overflow flag, and
// simultaneous read and write.
module tb_health_fifo;
  localparam int D = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic wr = 0, rd = 0;
  logic [15:0] wdata = 0, rdata;
  logic [3:0] count;
  logic empty, full, overflow;
  int checks = 0, failures = 0;
  logic [15:0] model[$];

  health_fifo #(.WIDTH(16), .DEPTH(D)) dut (.clk, .rst, .wr, .wdata, .rd, .rdata, .count,
                                            .empty, .full, .overflow);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic op(bit w, bit r, logic [15:0] v);
    @(negedge clk);
    if (r) begin
      check(!empty && rdata == model[0], $sformatf("read %h expected %h", rdata, model[0]));
    end
    wr = w; rd = r; wdata = v;
    @(posedge clk);
    // a write to a full FIFO is dropped even if a read happens in the same clock
    if (w && model.size() < D) model.push_back(v);
    if (r && model.size() > 0) void'(model.pop_front());
    @(negedge clk);
    wr = 0; rd = 0;
    check(int'(count) == model.size(), $sformatf("op w%0d r%0d count %0d model %0d", w, r, count, model.size()));
    check(empty == (model.size() == 0) && full == (model.size() == D), "flags");
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    check(empty && !full && !overflow, "empty after reset");
    for (int i = 0; i < 5; i++) op(1, 0, 16'h1000 + 16'(i));
    op(1, 1, 16'h1111);
    for (int i = 0; i < 3; i++) op(0, 1, 0);
    for (int i = 0; i < 6; i++) op(1, 0, 16'h2000 + 16'(i));
    check(full && !overflow, "full");
    op(1, 0, 16'hDEAD);
    check(overflow, "overflow flagged");
    for (int i = 0; i < 4; i++) op(1, 1, 16'h3000 + 16'(i));
    while (model.size() > 0) op(0, 1, 0);
    check(empty, "drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
