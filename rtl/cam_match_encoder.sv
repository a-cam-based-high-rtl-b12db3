// cam_match_encoder: match bus to address and Match Hit.
//
// Takes the registered per-entry match bus and registers, one clock later,
// the address of the matching entry and `match` (the Match Hit). Should
// several entries match, the lowest address wins (the document does not say;
// it expects unique patterns). With no match `match` is low and the address
// is 0, which stands for the document's "garbage" address.
module cam_match_encoder #(
  parameter int DEPTH = 32,
  parameter int AW    = 5
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [DEPTH-1:0] match_bus,
  output logic [AW-1:0]    addr,
  output logic             match
);
  logic [AW-1:0] enc;

  always_comb begin
    enc = '0;
    for (int i = DEPTH-1; i >= 0; i--)
      if (match_bus[i]) enc = AW'(i);
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      addr  <= '0;
      match <= 1'b0;
    end else begin
      addr  <= enc;
      match <= |match_bus;
    end
  end
endmodule
