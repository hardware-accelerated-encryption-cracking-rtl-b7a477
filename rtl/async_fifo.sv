// Dual-clock FIFO (first word fall-through) for crossing between the
// Ethernet-side user clock and the memory controller clock.
//
// 2**DEPTH_LOG2 entries of WIDTH bits.  Write and read pointers are kept in
// binary and Gray code; each Gray pointer crosses to the other clock
// through two flip-flops, so full and empty are pessimistic for a few
// cycles after the other side moves, never wrong.  wfull: do not write.
// rempty low: rdata holds the oldest entry; ren pops it.  Each side has its own
// synchronous active-high reset; both must be applied together.
module async_fifo #(
  parameter int unsigned WIDTH      = 8,
  parameter int unsigned DEPTH_LOG2 = 4
) (
  input  logic                wclk,
  input  logic                wrst,
  input  logic                wen,
  input  logic [WIDTH-1:0]    wdata,
  output logic                wfull,
  input  logic                rclk,
  input  logic                rrst,
  input  logic                ren,
  output logic [WIDTH-1:0]    rdata,
  output logic                rempty
);

  localparam int unsigned AW = DEPTH_LOG2;

  logic [WIDTH-1:0] mem [2**AW];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction
  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    for (int i = AW; i >= 0; i--) b[i] = (i == AW) ? g[i] : b[i + 1] ^ g[i];
    return b;
  endfunction

  // write side
  logic [AW:0] wbin_next;
  assign wbin_next = wbin + (AW+1)'(wen && !wfull);
  always_ff @(posedge wclk) begin
    if (wrst) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_next;
      wgray    <= bin2gray(wbin_next);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end
  always_ff @(posedge wclk) if (wen && !wfull) mem[wbin[AW-1:0]] <= wdata;
  assign wfull  = ((wbin - gray2bin(rgray_w2)) == (AW+1)'(2**AW));

  // read side
  logic [AW:0] rbin_next;
  assign rbin_next = rbin + (AW+1)'(ren && !rempty);
  always_ff @(posedge rclk) begin
    if (rrst) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_next;
      rgray    <= bin2gray(rbin_next);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end
  assign rempty = (rgray == wgray_r2);
  assign rdata  = mem[rbin[AW-1:0]];

endmodule
