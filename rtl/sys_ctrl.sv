// System controller: stores the encrypted image, runs the key search and
// returns the decrypted image.
//
// 1. Receive: every UDP payload byte from the data flow controller
//    (control_start/control_data_out) is written to DDR2 through the user
//    component; the end of each payload (control_eop) flushes the partial
//    burst.  The first 8 bytes of the image are also kept as the test
//    block (big-endian: byte 0 in bits 63:56).  A frame with an empty
//    payload ends the image.  Bytes that arrive while the memory side
//    reports mem_full, or outside the receive phase, are dropped and
//    counted in rx_dropped.
//    write_data is control_data_out passed straight through; only
//    mem_write is gated.
// 2. Search: the key search is started on the test block.  If it reports
//    exhausted, search_failed is set and the controller waits for the
//    next image.
// 3. Return: the image is read back word by word (two 64-bit blocks per
//    128-bit word, upper half first), each block decrypted by core 0 with
//    the found key (ECB), and the plaintext collected in a TX_CHUNK-byte
//    buffer.  A full buffer, or the end of the image, is streamed to the
//    data flow controller (control_complete high, one byte per cycle on
//    control_data_in) once control_busy is low; only the image's own
//    bytes are sent.  Memory words past the image are read and discarded.
//    Then the memory address is cleared for the next image.
//
// The flow (store in DDR2, crack, decrypt, send back) follows the described
// system; the end-of-image marker, the choice of the first block as test
// block, ECB decryption and the chunk size are this design's own.
module sys_ctrl
  import crack_pkg::*;
#(
  parameter int unsigned TX_CHUNK = 1024
) (
  input  logic         clk,
  input  logic         rst,
  // data flow controller
  input  logic         control_start,
  input  logic [7:0]   control_data_out,
  input  logic         control_eop,
  input  logic         control_busy,
  output logic         control_complete,
  output logic [7:0]   control_data_in,
  // memory user component
  output logic         mem_write,
  output logic [7:0]   write_data,
  output logic         mem_flush,
  output logic         mem_clear,
  output logic         mem_read,
  input  logic [127:0] read_data,
  input  logic         read_valid,
  output logic         read_ack,
  input  logic         read_done,
  input  logic         mem_full,
  input  logic         mem_ready,
  // key search
  output logic         ks_start,
  output block_t       ks_cipher,
  input  logic         ks_key_found,
  input  logic         ks_exhausted,
  input  logic         d_ready,
  output logic         d_start,
  output block_t       d_in,
  input  block_t       d_out,
  input  logic         d_valid,
  // status
  output logic [31:0]  image_bytes,
  output logic [31:0]  rx_dropped,
  output logic [31:0]  images_done,
  output logic [31:0]  tx_packets,
  output logic         search_failed
);

  localparam int unsigned CH_BLKS = TX_CHUNK / 8;
  localparam int unsigned BW      = $clog2(CH_BLKS + 1);
  localparam int unsigned TW      = $clog2(TX_CHUNK + 1);

  typedef enum logic [3:0] {
    C_RECV, C_SEARCH, C_SEARCH_WAIT, C_READ, C_WORD, C_DEC, C_DEC_WAIT,
    C_TX_WAIT, C_TX, C_TX_GAP, C_END
  } cstate_t;

  cstate_t       state;
  logic [31:0]   pkt_bytes;        // bytes of the current payload
  logic [31:0]   bytes_left;       // image bytes still to be returned
  logic [127:0]  word_q;
  logic          half;             // 0: upper block of word_q, 1: lower
  block_t        chunk [CH_BLKS];
  logic [BW-1:0] ch_blks;
  logic [TW-1:0] ch_bytes, tx_idx;
  logic [3:0]    gap;
  logic          after_tx_lo;      // lower half of word_q still to decrypt after the transfer

  logic rx_ok;
  assign rx_ok      = (state == C_RECV) && mem_ready && !mem_full;
  assign mem_write  = control_start && rx_ok;
  assign write_data = control_data_out;
  assign mem_flush  = control_eop && (state == C_RECV);
  assign mem_read   = (state == C_READ);
  assign mem_clear  = (state == C_END);
  assign ks_start   = (state == C_SEARCH);
  assign read_ack   = (state == C_WORD) && read_valid;
  assign d_start    = (state == C_DEC) && d_ready;
  assign d_in       = half ? word_q[63:0] : word_q[127:64];

  logic [7:0] blk_bytes;           // bytes of this block that belong to the image
  assign blk_bytes = (bytes_left >= 32'd8) ? 8'd8 : 8'(bytes_left);

  always_ff @(posedge clk) begin
    control_complete <= 1'b0;
    if (rst) begin
      state         <= C_RECV;
      pkt_bytes     <= '0;
      image_bytes   <= '0;
      bytes_left    <= '0;
      rx_dropped    <= '0;
      images_done   <= '0;
      tx_packets    <= '0;
      search_failed <= 1'b0;
      ks_cipher     <= '0;
      word_q        <= '0;
      half          <= 1'b0;
      ch_blks       <= '0;
      ch_bytes      <= '0;
      tx_idx        <= '0;
      gap           <= '0;
      after_tx_lo   <= 1'b0;
      control_data_in <= '0;
    end else begin
      if (control_start && !rx_ok) rx_dropped <= rx_dropped + 32'd1;
      unique case (state)
        C_RECV: begin
          if (mem_write) begin
            if (image_bytes < 32'd8) ks_cipher <= {ks_cipher[55:0], control_data_out};
            image_bytes <= image_bytes + 32'd1;
          end
          pkt_bytes <= control_eop ? '0 : pkt_bytes + 32'(control_start);
          if (control_eop && !control_start && pkt_bytes == '0 && image_bytes >= 32'd8) begin
            search_failed <= 1'b0;
            state         <= C_SEARCH;
          end
        end
        C_SEARCH: state <= C_SEARCH_WAIT;
        C_SEARCH_WAIT: begin
          if (ks_key_found) begin
            bytes_left <= image_bytes;
            ch_blks    <= '0;
            ch_bytes   <= '0;
            state      <= C_READ;
          end else if (ks_exhausted) begin
            search_failed <= 1'b1;
            state         <= C_END;
          end
        end
        C_READ: state <= C_WORD;
        C_WORD: begin
          if (read_valid) begin
            word_q <= read_data;
            half   <= 1'b0;
            if (bytes_left != '0) state <= C_DEC;
          end else if (read_done) begin
            state <= C_END;
          end
        end
        C_DEC: if (d_ready) state <= C_DEC_WAIT;
        C_DEC_WAIT: if (d_valid) begin
          logic last_blk, full;
          chunk[ch_blks[BW-2:0]] <= d_out;
          ch_blks    <= ch_blks + BW'(1);
          ch_bytes   <= ch_bytes + TW'(blk_bytes);
          bytes_left <= bytes_left - 32'(blk_bytes);
          last_blk = (bytes_left <= 32'd8);
          full     = (ch_blks == BW'(CH_BLKS - 1));
          after_tx_lo <= !half && !last_blk;
          if (full || last_blk) begin
            state <= C_TX_WAIT;
          end else if (!half) begin
            half  <= 1'b1;
            state <= C_DEC;
          end else begin
            state <= C_WORD;
          end
        end
        C_TX_WAIT: if (!control_busy) begin
          tx_idx <= '0;
          state  <= C_TX;
        end
        C_TX: begin
          logic [BW-2:0] bi;
          bi = (BW-1)'(tx_idx >> 3);
          control_complete <= 1'b1;
          control_data_in  <= chunk[bi][63 - 8*int'(tx_idx[2:0]) -: 8];
          tx_idx <= tx_idx + TW'(1);
          if (tx_idx == ch_bytes - TW'(1)) begin
            gap   <= '0;
            state <= C_TX_GAP;
          end
        end
        C_TX_GAP: begin
          // give the data flow controller time to take the frame (busy)
          gap <= gap + 4'd1;
          if (gap == 4'd7) begin
            tx_packets <= tx_packets + 32'd1;
            ch_blks    <= '0;
            ch_bytes   <= '0;
            if (after_tx_lo) begin
              half  <= 1'b1;
              state <= C_DEC;
            end else begin
              state <= C_WORD;
            end
          end
        end
        C_END: begin
          if (!search_failed) images_done <= images_done + 32'd1;
          image_bytes <= '0;
          pkt_bytes   <= '0;
          state       <= C_RECV;
        end
        default: state <= C_RECV;
      endcase
    end
  end

endmodule
