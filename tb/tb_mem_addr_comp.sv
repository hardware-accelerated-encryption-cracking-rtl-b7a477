// Self-checking testbench for mem_addr_comp: random increments and clears
// against a reference counter, clear having priority.
module tb_mem_addr_comp;
  logic clk = 1'b0, rst = 1'b1, incr = 1'b0, clr = 1'b0;
  logic [30:0] addr;
  int checks = 0, failures = 0;
  longint unsigned ref_addr = 0;
  always #5 clk = ~clk;

  mem_addr_comp dut (.clk, .rst, .incr, .clr, .addr);

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 500; i++) begin
      incr = ($urandom_range(0, 3) != 0);
      clr  = ($urandom_range(0, 40) == 0);
      @(negedge clk);
      if (clr) ref_addr = 0; else if (incr) ref_addr = (ref_addr + 4) & 32'h7FFF_FFFF;
      checks++;
      if (addr != 31'(ref_addr)) begin
        failures++;
        $display("FAIL step %0d: addr %h expected %h", i, addr, ref_addr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
