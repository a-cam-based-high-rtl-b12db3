// cam_entry: one stored pattern of the CAM.
//
// WORDS single word comparators are chained through their carry path; the
// chain's carry-in is the search enable, so the chain's end is high only when
// every nibble of the key hits its LUT. The result is registered: `match` is
// valid one clock after the key is applied. `we` loads all LUTs of the entry
// with `wbits` (two bits per word) during the 16-clock pattern write.
module cam_entry #(
  parameter int WORDS = 32
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 we,
  input  logic [2*WORDS-1:0]   wbits,
  input  logic [8*WORDS-1:0]   key,
  input  logic                 match_en,
  output logic                 match
);
  logic [WORDS:0] carry;
  assign carry[0] = match_en;

  for (genvar w = 0; w < WORDS; w++) begin : g_word
    swc u_swc (
      .clk, .rst, .we,
      .wbits(wbits[2*w +: 2]),
      .din  (key[8*w +: 8]),
      .cin  (carry[w]),
      .cout (carry[w+1])
    );
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) match <= 1'b0;
    else     match <= carry[WORDS];
  end
endmodule
