// port_ram: the RAM look-up table that turns a CAM address into a port entry.
//
// DEPTH entries of vnp_pkg::port_entry_t, one per CAM address. The control
// plane writes it through (we, waddr, wdata); the scheduler reads it with
// `re`, and `rdata` holds the entry from the clock after `re` until the next
// read. Contents are not reset (a plain RAM): every address the CAM can give
// must be written before use. The one-clock synchronous read is this design's
// choice; the document describes the RAM as slower than the CAM but gives no
// cycle count.
module port_ram
  import vnp_pkg::*;
#(
  parameter int DEPTH = 32,
  parameter int AW    = 5
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  port_entry_t   wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output port_entry_t   rdata
);
  port_entry_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
