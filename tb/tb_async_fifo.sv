// Self-checking testbench for async_fifo: unrelated write and read clocks,
// random write and read enables, 2000 words checked in order against a
// queue; also checks that full and empty are both seen.
module tb_async_fifo;
  logic wclk = 1'b0, rclk = 1'b0, rst = 1'b1;
  always #4 wclk = ~wclk;
  always #2.5 rclk = ~rclk;

  logic       wen = 1'b0, ren = 1'b0, wfull, rempty;
  logic [7:0] wdata = '0, rdata;
  int checks = 0, failures = 0, nw = 0, nr = 0, saw_full = 0, saw_empty = 0;
  logic [7:0] q [$];

  async_fifo #(.WIDTH(8), .DEPTH_LOG2(3)) dut (
    .wclk, .wrst(rst), .wen, .wdata, .wfull, .rclk, .rrst(rst), .ren, .rdata, .rempty);

  always @(negedge wclk) if (!rst) begin
    // wfull only changes on a write-clock edge, so the decision made here
    // is the one the FIFO takes at the next edge
    wen   = (nw < 2000) && ($urandom_range(0, 3) != 0);
    wdata = 8'($urandom);
    if (wen && !wfull) begin q.push_back(wdata); nw++; end
    if (wfull) saw_full++;
  end

  always @(negedge rclk) if (!rst) begin
    // slow reader in the first half (fills the FIFO), fast afterwards
    ren = (nr < 1000) ? ($urandom_range(0, 4) == 0) : 1'b1;
    if (ren && !rempty) begin
      checks++; nr++;
      if (q.size() == 0 || rdata != q[0]) begin
        failures++;
        $display("FAIL word %0d: got %h", nr, rdata);
      end
      if (q.size() != 0) void'(q.pop_front());
    end
    if (rempty) saw_empty++;
  end

  initial begin
    repeat (3) @(negedge wclk);
    rst = 1'b0;
    while (nr < 2000) @(negedge rclk);
    checks++; if (saw_full == 0)  begin failures++; $display("FAIL never full");  end
    checks++; if (saw_empty == 0) begin failures++; $display("FAIL never empty"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge wclk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
