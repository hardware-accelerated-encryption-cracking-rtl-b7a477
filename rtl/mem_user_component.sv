// User component of the DDR2 memory interface.
//
// Turns a byte stream into linearly addressed DDR2 burst writes, reads the
// stored data back in bursts, and isolates the user (Ethernet) clock from
// the memory controller clock.
//
// Memory controller FSM (clk domain):
//  - write: bytes (mem_write/write_data) are packed into a 32-byte burst
//    buffer, first byte in the top bits of the first 128-bit word.  When 32
//    bytes are in, or at mem_flush (end of packet) with a partial buffer,
//    the buffer moves to an issue register and is written as one BL4 burst:
//    one write command at the address held by mem_addr_comp plus two
//    128-bit data words, unused bytes masked (mask bit 1 = byte not
//    written).  The address then steps to the next burst.  mem_clear
//    restarts the address at zero for a new image; last_addr is that
//    register, so its two low bits stay 0.  mem_full asks the
//    writer to hold off (burst buffer full while the previous burst is
//    still being issued).
//  - read: mem_read starts a read-back from address zero; one read command
//    per burst is issued until the last written address is reached, but
//    only while the read FIFO has room for all data in flight.  Words come
//    out on read_data with read_valid (first word fall-through) and are
//    popped with read_ack; read_done rises once every word has been popped.
// User interface (fig. "user component"): address, write and read FIFOs,
// each a dual-clock FIFO; on the memory clock side they drain into / fill
// from the DDR2 controller's native interface (app_af_*, app_wdf_*,
// rd_data_*), honouring its almost-full flags.  mem_ready is the
// controller's phy_init_done (calibration done) brought to clk.
//
// Burst packing, masking of unused bytes, flushing at end of packet, the
// linear address register and read-back up to the last written address
// follow the described design.  The command encoding (write 0, read 1),
// address step of 4 per burst, FIFO depths and the handshakes are this
// design's own.
module mem_user_component #(
  parameter int unsigned DATA_W     = 128,
  parameter int unsigned BURST_LEN  = 4,
  parameter int unsigned ADDR_W     = 31,
  parameter int unsigned FIFO_DEPTH_LOG2 = 4
) (
  // user side
  input  logic              clk,
  input  logic              rst,
  input  logic              mem_write,
  input  logic [7:0]        write_data,
  input  logic              mem_flush,
  input  logic              mem_clear,
  input  logic              mem_read,
  output logic [DATA_W-1:0] read_data,
  output logic              read_valid,
  input  logic              read_ack,
  output logic              read_done,
  output logic              mem_full,
  output logic              mem_ready,
  output logic [ADDR_W-1:0] last_addr,
  // memory controller side
  input  logic              mem_clk,
  input  logic              mem_rst,
  input  logic              phy_init_done,
  output logic              app_af_wren,
  output logic [2:0]        app_af_cmd,
  output logic [ADDR_W-1:0] app_af_addr,
  input  logic              app_af_afull,
  output logic              app_wdf_wren,
  output logic [DATA_W-1:0] app_wdf_data,
  output logic [DATA_W/8-1:0] app_wdf_mask_data,
  input  logic              app_wdf_afull,
  input  logic              rd_data_valid,
  input  logic [DATA_W-1:0] rd_data_fifo_out
);

  // one BL4 burst on a DDR bus of DATA_W/2 bits carries two user words
  localparam int unsigned WORDS  = 2;
  localparam int unsigned BBYTES = WORDS * DATA_W / 8;   // 32
  localparam int unsigned CW     = $clog2(BBYTES + 1);
  localparam int unsigned AFW    = 3 + ADDR_W;
  localparam int unsigned WFW    = DATA_W + DATA_W / 8;
  localparam int unsigned FDEPTH = 2 ** FIFO_DEPTH_LOG2;
  localparam logic [2:0]  CMD_WRITE = 3'b000;
  localparam logic [2:0]  CMD_READ  = 3'b001;

  // ---------------- address component ----------------
  logic              addr_incr;
  logic [ADDR_W-1:0] wr_addr;
  mem_addr_comp #(.ADDR_W(ADDR_W), .STEP(BURST_LEN)) u_addr (
    .clk, .rst, .incr(addr_incr), .clr(mem_clear), .addr(wr_addr));
  assign last_addr = wr_addr;

  // ---------------- FIFOs ----------------
  logic           af_wen, af_full, af_empty, af_ren;
  logic [AFW-1:0] af_wdata, af_rdata;
  logic           wf_wen, wf_full, wf_empty, wf_ren;
  logic [WFW-1:0] wf_wdata, wf_rdata;
  logic           rf_empty, rf_full, rf_ren;

  async_fifo #(.WIDTH(AFW), .DEPTH_LOG2(FIFO_DEPTH_LOG2)) u_addr_fifo (
    .wclk(clk), .wrst(rst), .wen(af_wen), .wdata(af_wdata), .wfull(af_full),
    .rclk(mem_clk), .rrst(mem_rst), .ren(af_ren), .rdata(af_rdata), .rempty(af_empty));
  async_fifo #(.WIDTH(WFW), .DEPTH_LOG2(FIFO_DEPTH_LOG2)) u_write_fifo (
    .wclk(clk), .wrst(rst), .wen(wf_wen), .wdata(wf_wdata), .wfull(wf_full),
    .rclk(mem_clk), .rrst(mem_rst), .ren(wf_ren), .rdata(wf_rdata), .rempty(wf_empty));
  async_fifo #(.WIDTH(DATA_W), .DEPTH_LOG2(FIFO_DEPTH_LOG2)) u_read_fifo (
    .wclk(mem_clk), .wrst(mem_rst), .wen(rd_data_valid), .wdata(rd_data_fifo_out), .wfull(rf_full),
    .rclk(clk), .rrst(rst), .ren(rf_ren), .rdata(read_data), .rempty(rf_empty));

  // memory clock side: drain towards the controller
  assign af_ren            = !af_empty && !app_af_afull;
  assign app_af_wren       = af_ren;
  assign app_af_cmd        = af_rdata[AFW-1 -: 3];
  assign app_af_addr       = af_rdata[ADDR_W-1:0];
  assign wf_ren            = !wf_empty && !app_wdf_afull;
  assign app_wdf_wren      = wf_ren;
  assign app_wdf_mask_data = wf_rdata[WFW-1 -: DATA_W/8];
  assign app_wdf_data      = wf_rdata[DATA_W-1:0];

  // calibration flag to the user clock
  logic init_s1, init_s2;
  always_ff @(posedge clk) begin
    if (rst) begin init_s1 <= 1'b0; init_s2 <= 1'b0; end
    else     begin init_s1 <= phy_init_done; init_s2 <= init_s1; end
  end
  assign mem_ready = init_s2;

  // ---------------- write path ----------------
  logic [8*BBYTES-1:0] coll_data, iss_data;
  logic [BBYTES-1:0]   coll_mask, iss_mask;   // 1 = byte unused (masked)
  logic [CW-1:0]       coll_cnt;
  logic                flush_pend, iss_full, iss_phase;
  logic                move, wr_cmd, wr_word1;

  assign move     = !iss_full && (coll_cnt == CW'(BBYTES) || (flush_pend && coll_cnt != '0));
  assign mem_full = (coll_cnt >= CW'(BBYTES - 2)) && iss_full;
  assign wr_cmd   = iss_full && !iss_phase && !af_full && !wf_full;
  assign wr_word1 = iss_full && iss_phase && !wf_full;
  assign addr_incr = wr_word1;

  always_ff @(posedge clk) begin
    if (rst || mem_clear) begin
      coll_cnt   <= '0;
      coll_mask  <= '1;
      coll_data  <= '0;
      flush_pend <= 1'b0;
      iss_full   <= 1'b0;
      iss_phase  <= 1'b0;
      iss_data   <= '0;
      iss_mask   <= '1;
    end else begin
      if (move) begin
        iss_data  <= coll_data;
        iss_mask  <= coll_mask;
        iss_full  <= 1'b1;
        iss_phase <= 1'b0;
        flush_pend <= mem_flush;
        coll_data <= '0;
        coll_mask <= '1;
        coll_cnt  <= '0;
        if (mem_write) begin
          coll_data[8*BBYTES-1 -: 8] <= write_data;
          coll_mask[BBYTES-1]        <= 1'b0;
          coll_cnt                   <= CW'(1);
        end
      end else begin
        if (mem_write && coll_cnt != CW'(BBYTES)) begin
          coll_data[8*(BBYTES - 32'(coll_cnt)) - 1 -: 8] <= write_data;
          coll_mask[BBYTES - 1 - 32'(coll_cnt)]         <= 1'b0;
          coll_cnt                                       <= coll_cnt + CW'(1);
        end
        if (mem_flush) flush_pend <= 1'b1;
        else if (coll_cnt == '0 && !mem_write) flush_pend <= 1'b0;
      end
      if (wr_cmd)   iss_phase <= 1'b1;
      if (wr_word1) iss_full  <= 1'b0;
    end
  end

  // ---------------- read path ----------------
  logic              rd_active;
  logic [ADDR_W-1:0] rd_addr;
  logic [FIFO_DEPTH_LOG2+1:0] in_flight;   // words requested and not yet popped
  logic              rd_cmd;

  assign rd_cmd = rd_active && rd_addr != wr_addr && !wr_cmd && !af_full &&
                  (in_flight + (FIFO_DEPTH_LOG2+2)'(WORDS) <= (FIFO_DEPTH_LOG2+2)'(FDEPTH));
  assign read_valid = !rf_empty && rd_active;
  assign rf_ren     = read_valid && read_ack;

  always_ff @(posedge clk) begin
    if (rst || mem_clear) begin
      rd_active <= 1'b0;
      rd_addr   <= '0;
      in_flight <= '0;
      read_done <= 1'b0;
    end else begin
      if (mem_read) begin
        rd_active <= 1'b1;
        rd_addr   <= '0;
        read_done <= 1'b0;
      end else begin
        if (rd_cmd) rd_addr <= rd_addr + ADDR_W'(BURST_LEN);
        if (rd_active && rd_addr == wr_addr && in_flight == '0) begin
          rd_active <= 1'b0;
          read_done <= 1'b1;
        end
      end
      in_flight <= in_flight + (rd_cmd ? (FIFO_DEPTH_LOG2+2)'(WORDS) : '0) - (FIFO_DEPTH_LOG2+2)'(rf_ren);
    end
  end

  // address FIFO: write commands have priority over reads
  always_comb begin
    af_wen   = wr_cmd || rd_cmd;
    af_wdata = wr_cmd ? {CMD_WRITE, wr_addr} : {CMD_READ, rd_addr};
    wf_wen   = wr_cmd || wr_word1;
    wf_wdata = wr_cmd ? {iss_mask[BBYTES-1 -: DATA_W/8], iss_data[8*BBYTES-1 -: DATA_W]}
                      : {iss_mask[DATA_W/8-1:0],         iss_data[DATA_W-1:0]};
  end

  // the read FIFO never overflows thanks to the in-flight limit
  a_no_rf_overflow: assert property (@(posedge mem_clk) disable iff (mem_rst) rd_data_valid |-> !rf_full);
  a_no_lost_write:  assert property (@(posedge clk) disable iff (rst) mem_write |-> !(coll_cnt == CW'(BBYTES) && !move));

endmodule
