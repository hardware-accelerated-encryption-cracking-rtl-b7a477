// Blowfish brute-force key cracker: top level.
//
// An encrypted image arrives over Ethernet as UDP payloads, is stored in
// DDR2, and its first 64-bit block is attacked by N_CORES Blowfish cores
// that split the 32-bit key space between them.  A key is accepted when
// it decrypts that block to something starting with the JPEG marker
// 0xFFD8 (and re-encrypts back to it); the whole image is then decrypted
// with that key and returned as UDP payloads to the sender.
//
//   EMAC LocalLink rx ─> data_flow_ctrl ─payload─> sys_ctrl ─bytes─> mem_user_component ─> DDR2 controller
//   EMAC LocalLink tx <─ data_flow_ctrl <─reply──  sys_ctrl <─words─ mem_user_component <─ (native i/f)
//                                                  sys_ctrl <──────> bf_key_search (8 x bf_core + pi ROM)
//
// Clocks: clk is the Ethernet MAC's LocalLink clock and runs everything
// but the memory side of the user-component FIFOs, which runs on mem_clk
// (the DDR2 controller's 200 MHz user clock).  rst and mem_rst are
// synchronous, active high, one per clock.
//
// The MAC itself and the generated DDR2 controller with its physical
// layer and clock infrastructure are not part of this RTL: their LocalLink
// and native interfaces are ports here.  key_lo_start sets the first
// value of the per-core key counter (0 searches the whole key space).
// mem_last_addr counts in bursts of 4 columns, so its two low bits stay 0.
// The block split and the data path follow the described system; how the
// blocks are tied together is this design's own.
module bf_crack_top
  import crack_pkg::*;
#(
  parameter int unsigned N_CORES   = 8,
  parameter int unsigned CORE_BITS = $clog2(N_CORES)
) (
  input  logic         clk,
  input  logic         rst,
  // EMAC LocalLink receive
  input  logic [7:0]   rx_data,
  input  logic         rx_sof_n,
  input  logic         rx_eof_n,
  input  logic         rx_src_rdy_n,
  // EMAC LocalLink transmit
  output logic [7:0]   tx_data,
  output logic         tx_sof_n,
  output logic         tx_eof_n,
  output logic         tx_src_rdy_n,
  input  logic         tx_dst_rdy_n,
  // DDR2 controller native interface
  input  logic         mem_clk,
  input  logic         mem_rst,
  input  logic         phy_init_done,
  output logic         app_af_wren,
  output logic [2:0]   app_af_cmd,
  output logic [30:0]  app_af_addr,
  input  logic         app_af_afull,
  output logic         app_wdf_wren,
  output logic [127:0] app_wdf_data,
  output logic [15:0]  app_wdf_mask_data,
  input  logic         app_wdf_afull,
  input  logic         rd_data_valid,
  input  logic [127:0] rd_data_fifo_out,
  // search control and status
  input  logic [31-CORE_BITS:0] key_lo_start,
  output logic         search_busy,
  output logic         key_found,
  output word_t        found_key,
  output logic         search_failed,
  output logic [31:0]  image_bytes,
  output logic [30:0]  mem_last_addr,
  output logic [31:0]  images_done,
  output logic [31:0]  tx_packets,
  output logic [31:0]  rx_dropped,
  output logic [31:0]  stat_batches,
  output logic [31:0]  stat_hits
);

  // data flow controller <-> system controller
  logic         control_start, control_eop, control_busy, control_complete;
  logic [7:0]   control_data_out, control_data_in;
  // system controller <-> memory user component
  logic         mem_write, mem_flush, mem_clear, mem_read, read_valid, read_ack, read_done, mem_full, mem_ready;
  logic [7:0]   write_data;
  logic [127:0] read_data;
  // system controller <-> key search
  logic         ks_start, ks_exhausted, d_ready, d_start, d_valid;
  block_t       ks_cipher, d_in, d_out;

  data_flow_ctrl u_dfc (
    .clk, .rst,
    .rx_data, .rx_sof_n, .rx_eof_n, .rx_src_rdy_n,
    .tx_data, .tx_sof_n, .tx_eof_n, .tx_src_rdy_n, .tx_dst_rdy_n,
    .control_start, .control_data_out, .control_eop, .control_busy,
    .control_complete, .control_data_in);

  sys_ctrl u_sys (
    .clk, .rst,
    .control_start, .control_data_out, .control_eop, .control_busy,
    .control_complete, .control_data_in,
    .mem_write, .write_data, .mem_flush, .mem_clear, .mem_read,
    .read_data, .read_valid, .read_ack, .read_done, .mem_full, .mem_ready,
    .ks_start, .ks_cipher, .ks_key_found(key_found), .ks_exhausted,
    .d_ready, .d_start, .d_in, .d_out, .d_valid,
    .image_bytes, .rx_dropped, .images_done, .tx_packets, .search_failed);

  mem_user_component u_mem (
    .clk, .rst,
    .mem_write, .write_data, .mem_flush, .mem_clear, .mem_read,
    .read_data, .read_valid, .read_ack, .read_done, .mem_full, .mem_ready, .last_addr(mem_last_addr),
    .mem_clk, .mem_rst, .phy_init_done,
    .app_af_wren, .app_af_cmd, .app_af_addr, .app_af_afull,
    .app_wdf_wren, .app_wdf_data, .app_wdf_mask_data, .app_wdf_afull,
    .rd_data_valid, .rd_data_fifo_out);

  bf_key_search #(.N_CORES(N_CORES), .CORE_BITS(CORE_BITS)) u_search (
    .clk, .rst,
    .start(ks_start), .cipher_blk(ks_cipher), .key_lo_start,
    .busy(search_busy), .key_found, .exhausted(ks_exhausted), .found_key,
    .stat_batches, .stat_hits,
    .d_ready, .d_start, .d_in, .d_out, .d_valid);

endmodule
