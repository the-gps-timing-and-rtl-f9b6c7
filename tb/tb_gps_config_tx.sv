// tb_gps_config_tx: self-checking test of the GPS configuration string
// sender (8 clocks per RS232 bit). A string is written byte by byte, sent
// by writing its length, and decoded from the serial line by an
// independent receiver in the testbench; the bytes, their order, the busy
// flag, the 10-bit frame time and a second, shorter string are checked.
module tb_gps_config_tx;
  localparam int CPB = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic wr_byte = 0, send = 0, busy, txd;
  logic [7:0] wdata = 0;
  logic [7:0] len = 0, fill;
  int checks = 0, failures = 0;
  byte unsigned got[$];
  int frame_start[$];
  int cyc = 0;

  gps_config_tx #(.CLKS_PER_BIT(CPB), .BUF_BYTES(128)) dut (
    .clk, .rst, .wr_byte, .wdata, .send, .len, .busy, .fill, .txd);

  always @(posedge clk) cyc++;

  // independent serial receiver: sample mid-bit
  initial begin
    forever begin
      byte unsigned b;
      @(negedge txd);
      frame_start.push_back(cyc);
      repeat (CPB / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = txd;
      end
      repeat (CPB) @(posedge clk);
      if (txd) got.push_back(b);
      else begin failures++; $display("FAIL: stop bit"); end
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send_string(string s);
    foreach (s[i]) begin
      @(negedge clk) begin wr_byte = 1; wdata = s[i]; end
    end
    @(negedge clk) wr_byte = 0;
    check(int'(fill) == s.len(), "fill level");
    @(negedge clk) begin send = 1; len = 8'(s.len()); end
    @(negedge clk) send = 0;
    check(busy, "busy while sending");
    while (busy) @(negedge clk);
    repeat (2 * CPB) @(posedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string s1 = "$PMTK220,1000*1F\r\n";
    string s2 = "$CFG*00\r\n";
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (5) @(posedge clk);
    send_string(s1);
    check(got.size() == s1.len(), $sformatf("%0d bytes received", got.size()));
    for (int i = 0; i < s1.len() && i < got.size(); i++)
      check(got[i] == s1[i], $sformatf("byte %0d: %h expected %h", i, got[i], s1[i]));
    for (int i = 1; i < frame_start.size(); i++)
      check(frame_start[i] - frame_start[i-1] >= 10 * CPB, "frame spacing at least 10 bits");
    check(fill == 0, "buffer reset after sending");
    got.delete();
    send_string(s2);
    check(got.size() == s2.len(), "second string length");
    for (int i = 0; i < s2.len() && i < got.size(); i++)
      check(got[i] == s2[i], $sformatf("second string byte %0d", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
