// Data flow controller between the Ethernet MAC and the system controller.
//
// Receive: frames arrive on an 8-bit LocalLink port from the MAC (active-
// low sof/eof/src_rdy, no back-pressure).  The inputs are registered
// once, then the first HDR_BYTES bytes (14-byte Ethernet, 20-byte IPv4 and
// 8-byte UDP header, no options) are stored and the rest of the frame, the
// UDP payload, is passed on one byte per cycle: control_start is high
// while control_data_out carries a payload byte.  control_eop is high with
// the last payload byte, or alone for a frame whose payload is empty;
// frames shorter than a full header are ignored.  No field is checked.
//
// Transmit: the system controller streams the outgoing payload on
// control_data_in while holding control_complete high (one byte per
// cycle); the bytes are buffered (up to MAX_PAYLOAD, extra bytes are
// dropped).  When control_complete falls the frame is sent: the last
// received header with source and destination MAC addresses swapped and
// source and destination IP addresses swapped (ports are kept), IP total
// length and UDP length set for the new payload, the IP header checksum
// recomputed and the UDP checksum sent as 0 (not used), followed by the
// payload.  control_busy is high while the frame is being sent; a byte is
// taken by the MAC on each clock edge where tx_src_rdy_n and tx_dst_rdy_n
// are both low.
//
// Scanning the header, forwarding the payload, keeping the header for the
// reply, buffering the reply payload before sending and swapping the
// addresses follow the described design; the length/checksum rewrite, the
// eop strobe and the buffer size are this design's own.
module data_flow_ctrl #(
  parameter int unsigned HDR_BYTES   = 42,
  parameter int unsigned MAX_PAYLOAD = 1472
) (
  input  logic       clk,
  input  logic       rst,
  // LocalLink receive (from MAC)
  input  logic [7:0] rx_data,
  input  logic       rx_sof_n,
  input  logic       rx_eof_n,
  input  logic       rx_src_rdy_n,
  // LocalLink transmit (to MAC)
  output logic [7:0] tx_data,
  output logic       tx_sof_n,
  output logic       tx_eof_n,
  output logic       tx_src_rdy_n,
  input  logic       tx_dst_rdy_n,
  // system controller
  output logic       control_start,
  output logic [7:0] control_data_out,
  output logic       control_eop,
  output logic       control_busy,
  input  logic       control_complete,
  input  logic [7:0] control_data_in
);

  localparam int unsigned PW = $clog2(MAX_PAYLOAD + 1);
  localparam int unsigned FW = $clog2(HDR_BYTES + MAX_PAYLOAD + 1);

  typedef enum logic {RX_WAIT_SOF, RX_WAIT_EOF} rx_state_t;
  typedef enum logic [1:0] {TX_WAIT_CONTROL, TX_READ_IN_DATA, TX_SENDING} tx_state_t;

  // ---------------- receive ----------------
  logic [7:0]  rx_data_reg;
  logic        rx_sof_reg, rx_eof_reg, rx_vld_reg;   // active high after registering
  rx_state_t   rx_state;
  logic [15:0] rx_index;
  logic [7:0]  rx_hdr [HDR_BYTES];

  always_ff @(posedge clk) begin
    if (rst) begin
      rx_data_reg <= '0;
      rx_sof_reg  <= 1'b0;
      rx_eof_reg  <= 1'b0;
      rx_vld_reg  <= 1'b0;
    end else begin
      rx_data_reg <= rx_data;
      rx_sof_reg  <= ~rx_sof_n;
      rx_eof_reg  <= ~rx_eof_n;
      rx_vld_reg  <= ~rx_src_rdy_n;
    end
  end

  always_ff @(posedge clk) begin
    control_start <= 1'b0;
    control_eop   <= 1'b0;
    if (rst) begin
      rx_state         <= RX_WAIT_SOF;
      rx_index         <= '0;
      control_data_out <= '0;
    end else if (rx_vld_reg) begin
      logic [15:0] idx;
      idx = (rx_state == RX_WAIT_SOF || rx_sof_reg) ? 16'd0 : rx_index;
      if (rx_state == RX_WAIT_SOF && !rx_sof_reg) begin
        // bytes outside a frame are ignored
      end else begin
        if (idx < 16'(HDR_BYTES)) begin
          rx_hdr[idx[$clog2(HDR_BYTES)-1:0]] <= rx_data_reg;
        end else begin
          control_start    <= 1'b1;
          control_data_out <= rx_data_reg;
        end
        if (rx_eof_reg) begin
          control_eop <= (idx >= 16'(HDR_BYTES - 1));
          rx_state    <= RX_WAIT_SOF;
        end else begin
          rx_state <= RX_WAIT_EOF;
        end
        rx_index <= (idx == 16'hFFFF) ? idx : idx + 16'd1;
      end
    end
  end

  // ---------------- transmit ----------------
  tx_state_t   tx_state;
  logic [7:0]  udp_payload [MAX_PAYLOAD];
  logic [PW-1:0] pay_len;
  logic [7:0]  tx_hdr [HDR_BYTES];
  logic [FW-1:0] tx_index;
  logic [FW-1:0] frame_len;
  logic        ctrl_complete_reg;
  logic [7:0]  ctrl_data_reg;

  // outgoing header byte i, built from the stored receive header
  function automatic logic [7:0] out_hdr(input int unsigned i, input logic [7:0] h [HDR_BYTES],
                                         input logic [15:0] ip_len, input logic [15:0] udp_len,
                                         input logic [15:0] ip_csum);
    if (i < 6)        return h[i + 6];           // destination MAC <- source MAC
    else if (i < 12)  return h[i - 6];           // source MAC <- destination MAC
    else if (i == 16) return ip_len[15:8];
    else if (i == 17) return ip_len[7:0];
    else if (i == 24) return ip_csum[15:8];
    else if (i == 25) return ip_csum[7:0];
    else if (i >= 26 && i < 30) return h[i + 4]; // source IP <- destination IP
    else if (i >= 30 && i < 34) return h[i - 4]; // destination IP <- source IP
    else if (i == 38) return udp_len[15:8];
    else if (i == 39) return udp_len[7:0];
    else if (i == 40 || i == 41) return 8'h00;   // UDP checksum unused
    else              return h[i];
  endfunction

  logic [15:0] ip_len, udp_len, ip_csum;
  always_comb begin
    logic [19:0] sum;
    ip_len  = 16'(pay_len) + 16'd28;
    udp_len = 16'(pay_len) + 16'd8;
    sum = '0;
    // IPv4 header words (bytes 14..33) with the new length and a zero checksum
    for (int w = 0; w < 10; w++) begin
      if (w == 1)      sum += 20'(ip_len);
      else if (w != 5) sum += 20'({tx_hdr[14 + 2*w], tx_hdr[15 + 2*w]});
    end
    sum = 20'(sum[15:0]) + 20'(sum[19:16]);
    sum = 20'(sum[15:0]) + 20'(sum[19:16]);
    ip_csum = ~sum[15:0];
  end

  logic [7:0] next_byte;
  logic [FW-1:0] next_index;
  always_comb begin
    next_index = tx_index + FW'(1);
    if (next_index < FW'(HDR_BYTES))
      next_byte = out_hdr(int'(next_index), tx_hdr, ip_len, udp_len, ip_csum);
    else
      next_byte = udp_payload[PW'(next_index - FW'(HDR_BYTES))];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      tx_state          <= TX_WAIT_CONTROL;
      pay_len           <= '0;
      tx_index          <= '0;
      frame_len         <= '0;
      tx_data           <= '0;
      tx_sof_n          <= 1'b1;
      tx_eof_n          <= 1'b1;
      tx_src_rdy_n      <= 1'b1;
      control_busy      <= 1'b0;
      ctrl_complete_reg <= 1'b0;
      ctrl_data_reg     <= '0;
    end else begin
      ctrl_complete_reg <= control_complete;
      ctrl_data_reg     <= control_data_in;
      unique case (tx_state)
        TX_WAIT_CONTROL: begin
          pay_len <= '0;
          if (ctrl_complete_reg) begin
            udp_payload[0] <= ctrl_data_reg;
            pay_len        <= PW'(1);
            tx_state       <= TX_READ_IN_DATA;
          end
        end
        TX_READ_IN_DATA: begin
          if (ctrl_complete_reg) begin
            if (pay_len < PW'(MAX_PAYLOAD)) begin
              udp_payload[pay_len] <= ctrl_data_reg;
              pay_len              <= pay_len + PW'(1);
            end
          end else begin
            // end of the outgoing payload: freeze the header and start the frame
            for (int i = 0; i < HDR_BYTES; i++) tx_hdr[i] <= rx_hdr[i];
            tx_state     <= TX_SENDING;
            control_busy <= 1'b1;
            tx_index     <= '1;           // next_index wraps to 0
            frame_len    <= FW'(HDR_BYTES) + FW'(pay_len);
          end
        end
        TX_SENDING: begin
          if (tx_src_rdy_n || !tx_dst_rdy_n) begin
            // output register empty or its byte taken: load the next byte
            if (tx_index == frame_len - FW'(1) && !tx_src_rdy_n) begin
              tx_src_rdy_n <= 1'b1;
              tx_sof_n     <= 1'b1;
              tx_eof_n     <= 1'b1;
              control_busy <= 1'b0;
              tx_state     <= TX_WAIT_CONTROL;
            end else begin
              tx_data      <= next_byte;
              tx_sof_n     <= ~(next_index == '0);
              tx_eof_n     <= ~(next_index == frame_len - FW'(1));
              tx_src_rdy_n <= 1'b0;
              tx_index     <= next_index;
            end
          end
        end
        default: tx_state <= TX_WAIT_CONTROL;
      endcase
    end
  end

endmodule
