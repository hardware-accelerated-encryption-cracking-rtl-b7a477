// Self-checking testbench for bf_f_func: random S-box words against
// ((a + b) ^ c) + d computed here with 64-bit arithmetic truncated to 32
// bits, plus a carry case.
module tb_bf_f_func;
  import crack_pkg::*;
  word_t s [4], f;
  int checks = 0, failures = 0;

  bf_f_func dut (.s, .f);

  initial begin
    for (int i = 0; i < 300; i++) begin
      longint unsigned a, b, c, d, e;
      a = $urandom; b = $urandom; c = $urandom; d = $urandom;
      if (i == 0) begin a = 32'hFFFFFFFF; b = 1; c = 0; d = 32'hFFFFFFFF; end
      s[0] = word_t'(a); s[1] = word_t'(b); s[2] = word_t'(c); s[3] = word_t'(d);
      e = ((((a + b) & 32'hFFFFFFFF) ^ c) + d) & 32'hFFFFFFFF;
      #1;
      checks++;
      if (f != word_t'(e)) begin
        failures++;
        $display("FAIL %h %h %h %h: got %h expected %h", s[0], s[1], s[2], s[3], f, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
