// cam_write_data: the serial write bits for all nibble LUTs of an entry.
//
// For nibble i of the pattern the bit written at count `cnt` is 1 when the
// nibble equals `cnt`, so after 16 clocks each LUT holds a one-hot table of
// its nibble. Nibbles at or above `care` are don't-care: they write 1 at
// every count and match any key. `care` is the pattern's header length in
// nibbles, set by the control plane with each write, so patterns with
// shorter or longer headers can share the CAM (40 nibbles = 20 header bytes
// in the prototype's traffic).
module cam_write_data #(
  parameter int WIDTH = 256,
  parameter int CW    = $clog2(WIDTH/4 + 1)
) (
  input  logic [WIDTH-1:0]   pattern,
  input  logic [CW-1:0]      care,
  input  logic [3:0]         cnt,
  output logic [WIDTH/4-1:0] data
);
  always_comb begin
    for (int i = 0; i < WIDTH/4; i++)
      data[i] = (i >= int'(care)) || (pattern[4*i +: 4] == cnt);
  end
endmodule
