// cam_write_counter: sequences a CAM pattern write.
//
// A pattern is written into the nibble LUTs serially, one table bit per clock,
// so a write takes 16 clocks. On `write_en` while idle the block latches the
// entry address, the pattern and its header length (`care_in`, in nibbles),
// raises `we` and counts `cnt` down from 15 to 0 (the bit written at count k
// lands at table position k). `write_rdy` is
// high whenever no write is in progress; a `write_en` while busy is ignored.
// The counter, `we` and `write_rdy` names follow the document's schematic;
// latching the pattern (rather than requiring it to be held for 16 clocks)
// is this design's choice.
module cam_write_counter #(
  parameter int WIDTH = 256,
  parameter int AW    = 5,
  parameter int CW    = $clog2(WIDTH/4 + 1)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             write_en,
  input  logic [AW-1:0]    addr_in,
  input  logic [WIDTH-1:0] pattern_in,
  input  logic [CW-1:0]    care_in,
  output logic [AW-1:0]    addr,
  output logic [WIDTH-1:0] pattern,
  output logic [CW-1:0]    care,
  output logic [3:0]       cnt,
  output logic             we,
  output logic             write_rdy
);
  logic busy;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      busy    <= 1'b0;
      cnt     <= '0;
      addr    <= '0;
      pattern <= '0;
      care    <= '0;
    end else if (!busy) begin
      if (write_en) begin
        busy    <= 1'b1;
        cnt     <= 4'd15;
        addr    <= addr_in;
        pattern <= pattern_in;
        care    <= care_in;
      end
    end else begin
      cnt <= cnt - 4'd1;
      if (cnt == 4'd0) busy <= 1'b0;
    end
  end

  assign we        = busy;
  assign write_rdy = !busy;
endmodule
