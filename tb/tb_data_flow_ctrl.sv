// Self-checking testbench for data_flow_ctrl.
//
// Sends a UDP frame whose addresses, ports and 18-byte payload are those of
// the example traffic (MAC DA:02:03:04:05:06 <- 5A:02:03:04:05:06, IP
// 170.187.204.221 -> 85.102.119.136, ports 0x1122 -> 0xEEFF) and checks
// that exactly the payload comes out with control_start, ending with
// control_eop.  Then an empty-payload frame (eop alone) and a runt frame
// (nothing).  Then streams an 11-byte reply and checks the transmitted
// frame byte by byte against a frame built here (addresses swapped,
// lengths and IP checksum recomputed), with random tx_dst_rdy_n stalls,
// and that control_busy covers the frame.
module tb_data_flow_ctrl;

  logic clk = 1'b0, rst = 1'b1;
  always #4 clk = ~clk;

  logic [7:0] rx_data = '0, tx_data, control_data_out, control_data_in = '0;
  logic rx_sof_n = 1, rx_eof_n = 1, rx_src_rdy_n = 1, tx_dst_rdy_n = 1;
  logic tx_sof_n, tx_eof_n, tx_src_rdy_n;
  logic control_start, control_eop, control_busy, control_complete = 0;

  int checks = 0, failures = 0;

  data_flow_ctrl dut (.*);

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  byte unsigned hdr [42] = '{8'hDA, 8'h02, 8'h03, 8'h04, 8'h05, 8'h06,
                             8'h5A, 8'h02, 8'h03, 8'h04, 8'h05, 8'h06, 8'h08, 8'h00,
                             8'h45, 8'h00, 8'h00, 8'h2E, 8'h00, 8'h01, 8'h00, 8'h00,
                             8'hFF, 8'h11, 8'h00, 8'h00,
                             8'hAA, 8'hBB, 8'hCC, 8'hDD, 8'h55, 8'h66, 8'h77, 8'h88,
                             8'h11, 8'h22, 8'hEE, 8'hFF, 8'h00, 8'h1A, 8'h00, 8'h00};
  byte unsigned pay [18] = '{8'h10, 8'h11, 8'h12, 8'h23, 8'h24, 8'h25, 8'h42, 8'h4D, 8'h52,
                             8'h4E, 8'h21, 8'h2B, 8'h28, 8'h00, 8'h28, 8'h05, 8'h21, 8'h31};
  byte unsigned reply [11] = '{8'h45, 8'h43, 8'h4F, 8'h43, 8'h65, 8'h43, 8'h65, 8'h2E, 8'h2F, 8'h30, 8'h31};

  // captured receive side
  byte unsigned got_pay [$];
  int eops = 0;
  always @(posedge clk) begin
    if (control_start) got_pay.push_back(control_data_out);
    if (control_eop) eops++;
  end

  task automatic send_frame(input int npay, input int nhdr);
    for (int i = 0; i < nhdr + npay; i++) begin
      @(negedge clk);
      rx_data = (i < nhdr) ? hdr[i] : pay[i - nhdr];
      rx_sof_n = (i != 0); rx_eof_n = (i != nhdr + npay - 1); rx_src_rdy_n = 0;
    end
    @(negedge clk); rx_sof_n = 1; rx_eof_n = 1; rx_src_rdy_n = 1;
    repeat (5) @(negedge clk);
  endtask

  // transmit side capture with random stalls
  byte unsigned got_tx [$];
  int sofs = 0, eofs = 0, busy_bad = 0;
  always @(posedge clk) begin
    if (!tx_src_rdy_n && !tx_dst_rdy_n) begin
      got_tx.push_back(tx_data);
      if (!tx_sof_n) sofs++;
      if (!tx_eof_n) eofs++;
      if (!control_busy) busy_bad++;
    end
  end
  always @(negedge clk) tx_dst_rdy_n = ($urandom_range(0, 3) == 0);

  initial begin
    byte unsigned exp [$];
    int unsigned sum;
    repeat (3) @(negedge clk);
    rst = 0;
    send_frame(18, 42);
    check("payload bytes", got_pay.size(), 18);
    foreach (pay[i]) if (i < got_pay.size()) check($sformatf("payload[%0d]", i), got_pay[i], pay[i]);
    check("eop after payload", eops, 1);
    send_frame(0, 42);
    check("eop for empty payload", eops, 2);
    check("no bytes for empty payload", got_pay.size(), 18);
    send_frame(0, 20);
    check("runt ignored", eops, 2);
    // reply
    @(negedge clk);
    foreach (reply[i]) begin control_complete = 1; control_data_in = reply[i]; @(negedge clk); end
    control_complete = 0;
    repeat (400) @(negedge clk);
    // expected frame
    for (int i = 0; i < 42; i++) exp.push_back(hdr[i]);
    for (int i = 0; i < 6; i++) begin exp[i] = hdr[i + 6]; exp[i + 6] = hdr[i]; end
    for (int i = 0; i < 4; i++) begin exp[26 + i] = hdr[30 + i]; exp[30 + i] = hdr[26 + i]; end
    exp[16] = 0; exp[17] = 28 + 11; exp[38] = 0; exp[39] = 8 + 11; exp[40] = 0; exp[41] = 0;
    exp[24] = 0; exp[25] = 0;
    sum = 0;
    for (int w = 0; w < 10; w++) sum += {exp[14 + 2*w], exp[15 + 2*w]};
    while (sum > 16'hFFFF) sum = (sum & 16'hFFFF) + (sum >> 16);
    sum = ~sum & 16'hFFFF;
    exp[24] = sum[15:8]; exp[25] = sum[7:0];
    foreach (reply[i]) exp.push_back(reply[i]);
    check("tx frame length", got_tx.size(), exp.size());
    foreach (exp[i]) if (i < got_tx.size()) check($sformatf("tx[%0d]", i), got_tx[i], exp[i]);
    check("one sof", sofs, 1);
    check("one eof", eofs, 1);
    check("busy during frame", busy_bad, 0);
    check("busy released", control_busy, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
