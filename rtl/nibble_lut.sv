// nibble_lut: the 4-bit look-up table at the bottom of the CAM.
//
// A 16x1 shift register with a 4-bit read select, as in the SRL16 cells the
// document's CAM is built from. During a pattern write the CAM shifts in 16
// bits, one per clock while `we` is high; bit k of the table ends up 1 only
// for the key value k that should match (all ones for a don't-care nibble).
// During a search the 4 key bits on `sel` pick one table bit: `q` is the
// nibble's match, combinational from `sel`. Reset clears the table so that an
// unwritten entry never matches (the document does not describe reset).
module nibble_lut (
  input  logic       clk,
  input  logic       rst,
  input  logic       we,
  input  logic       d,
  input  logic [3:0] sel,
  output logic       q
);
  logic [15:0] sr;

  always_ff @(posedge clk or posedge rst) begin
    if (rst)     sr <= '0;
    else if (we) sr <= {sr[14:0], d};
  end

  assign q = sr[sel];
endmodule
