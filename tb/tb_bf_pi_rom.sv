// Self-checking testbench for bf_pi_rom.  Spot values of the Blowfish
// initial table (hex digits of pi - 3): P[0] = 243F6A88, P[1] = 85A308D3,
// P[17] = 8979FB1B, S0[0] = D1310BA6, S0[1] = 98DFB5AC, S1[0] = 4B7A70E9,
// S2[0] = E93D5A68, S3[0] = 3A39CE37, S3[255] = 3AC372E6; P reads as zero
// past index 17.  Checks the one-cycle read latency.
module tb_bf_pi_rom;
  import crack_pkg::*;
  logic clk = 1'b0;
  logic [7:0] addr = '0;
  word_t p, s [4];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  bf_pi_rom dut (.clk, .addr, .p, .s);

  task automatic chk(input string what, input word_t got, input word_t exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  task automatic rd(input logic [7:0] a);
    @(negedge clk); addr = a; @(negedge clk);
  endtask

  initial begin
    rd(0);   chk("P0", p, 32'h243F6A88); chk("S0[0]", s[0], 32'hD1310BA6);
             chk("S1[0]", s[1], 32'h4B7A70E9); chk("S2[0]", s[2], 32'hE93D5A68); chk("S3[0]", s[3], 32'h3A39CE37);
    rd(1);   chk("P1", p, 32'h85A308D3); chk("S0[1]", s[0], 32'h98DFB5AC);
    rd(17);  chk("P17", p, 32'h8979FB1B);
    rd(18);  chk("P past end", p, 32'h0);
    rd(255); chk("S3[255]", s[3], 32'h3AC372E6);
    // latency: the output changes only after the clock edge
    @(negedge clk); addr = 8'd0; #1; chk("held before edge", s[3], 32'h3AC372E6);
    @(negedge clk); chk("after edge", s[3], 32'h3A39CE37);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
