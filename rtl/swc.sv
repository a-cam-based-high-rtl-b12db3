// swc: single word comparator of the CAM (one 8-bit word).
//
// The word is split into two nibbles, each looked up in its own nibble_lut.
// Two carry multiplexers follow: each passes the carry-in when its LUT says
// "match" and drives 0 otherwise, so `cout` = cin & low-nibble match &
// high-nibble match. Chaining words through cin/cout gives the wide AND of a
// CAM entry without a separate gate tree, as the document's carry-chain
// comparator does. Writes load the two LUTs with `wbits` (bit 0: low nibble).
module swc (
  input  logic       clk,
  input  logic       rst,
  input  logic       we,
  input  logic [1:0] wbits,
  input  logic [7:0] din,
  input  logic       cin,
  output logic       cout
);
  logic hit_lo, hit_hi, c_mid;

  nibble_lut u_lo (.clk, .rst, .we, .d(wbits[0]), .sel(din[3:0]), .q(hit_lo));
  nibble_lut u_hi (.clk, .rst, .we, .d(wbits[1]), .sel(din[7:4]), .q(hit_hi));

  // Carry multiplexers: select 0 gives ground, select 1 gives the carry-in.
  assign c_mid = hit_lo ? cin   : 1'b0;
  assign cout  = hit_hi ? c_mid : 1'b0;
endmodule
