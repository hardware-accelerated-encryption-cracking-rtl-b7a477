// Address component of the DDR2 user component.
//
// A register holding the memory address of the next burst write.  The
// image is stored linearly: incr (pulsed after each burst write) advances
// the address by STEP, clr returns it to zero for a new image.  Because
// it only moves on writes, addr is also the end of the stored image: the
// read-back walks from zero up to this value.  clr wins over incr.
module mem_addr_comp #(
  parameter int unsigned ADDR_W = 31,
  parameter int unsigned STEP   = 4
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              incr,
  input  logic              clr,
  output logic [ADDR_W-1:0] addr
);

  always_ff @(posedge clk) begin
    if (rst || clr)  addr <= '0;
    else if (incr)   addr <= addr + ADDR_W'(STEP);
  end

endmodule
