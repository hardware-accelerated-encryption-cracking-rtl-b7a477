// Behavioural model of a DDR2 controller's native user interface, for
// simulation only.
//
// Raises phy_init_done after INIT_CYCLES memory clocks.  Takes commands
// (app_af_cmd 0 = write, 1 = read, app_af_addr in 64-bit columns, 4 per
// burst) and write-data words (two 128-bit words per burst, mask bit 1 =
// byte kept unchanged) into queues; a write is performed once both its data
// words are present, a read returns its two words on rd_data_valid /
// rd_data_fifo_out READ_LAT cycles after it is taken.  Commands run in
// order.  The almost-full flags are asserted at random when STALL is set.
// Storage is sparse (associative array keyed by word address); unwritten
// words read as zero.
module ddr2_mig_model #(
  parameter int unsigned INIT_CYCLES = 40,
  parameter int unsigned READ_LAT    = 12,
  parameter bit          STALL       = 1'b1
) (
  input  logic         mem_clk,
  input  logic         mem_rst,
  output logic         phy_init_done,
  input  logic         app_af_wren,
  input  logic [2:0]   app_af_cmd,
  input  logic [30:0]  app_af_addr,
  output logic         app_af_afull,
  input  logic         app_wdf_wren,
  input  logic [127:0] app_wdf_data,
  input  logic [15:0]  app_wdf_mask_data,
  output logic         app_wdf_afull,
  output logic         rd_data_valid,
  output logic [127:0] rd_data_fifo_out
);

  logic [127:0] store [longint unsigned];
  logic [33:0]  cmdq [$];
  logic [143:0] wdq [$];
  int unsigned  cyc = 0;
  longint unsigned rdq_time [$];
  logic [127:0] rdq_data [$];
  int unsigned  n_writes = 0, n_reads = 0;

  initial begin
    phy_init_done = 1'b0; app_af_afull = 1'b0; app_wdf_afull = 1'b0; rd_data_valid = 1'b0; rd_data_fifo_out = '0;
  end

  always @(posedge mem_clk) begin
    cyc++;
    rd_data_valid <= 1'b0;
    if (mem_rst) begin
      phy_init_done <= 1'b0;
      cyc = 0;
    end else begin
      if (cyc > INIT_CYCLES) phy_init_done <= 1'b1;
      if (app_af_wren)  cmdq.push_back({app_af_cmd, app_af_addr});
      if (app_wdf_wren) wdq.push_back({app_wdf_mask_data, app_wdf_data});
      // execute the oldest command
      if (cmdq.size() > 0) begin
        logic [33:0] c;
        longint unsigned wa;
        c  = cmdq[0];
        wa = longint'(c[30:0]) / 2;    // 128-bit word index (2 columns per word)
        if (c[33:31] == 3'b000 && wdq.size() >= 2) begin
          for (longint unsigned k = 0; k < 2; k++) begin
            logic [143:0] d;
            logic [127:0] old;
            d = wdq.pop_front();
            old = store.exists(wa + k) ? store[wa + k] : '0;
            for (int b = 0; b < 16; b++)
              if (!d[128 + b]) old[8*b +: 8] = d[8*b +: 8];
            store[wa + k] = old;
          end
          void'(cmdq.pop_front());
          n_writes++;
        end else if (c[33:31] == 3'b001) begin
          for (longint unsigned k = 0; k < 2; k++) begin
            rdq_time.push_back(cyc + READ_LAT + k);
            rdq_data.push_back(store.exists(wa + k) ? store[wa + k] : '0);
          end
          void'(cmdq.pop_front());
          n_reads++;
        end
      end
      if (rdq_time.size() > 0 && rdq_time[0] <= cyc) begin
        void'(rdq_time.pop_front());
        rd_data_fifo_out <= rdq_data.pop_front();
        rd_data_valid    <= 1'b1;
      end
      app_af_afull  <= STALL && ($urandom_range(0, 7) == 0);
      app_wdf_afull <= STALL && ($urandom_range(0, 7) == 0);
    end
  end

endmodule
