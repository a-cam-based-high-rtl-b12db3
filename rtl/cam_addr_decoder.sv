// cam_addr_decoder: selects the CAM entry being written.
//
// Decodes the AW-bit entry address into a one-hot word select of 2**AW lines,
// all low unless `we` is high. Purely combinational, as in the document's
// AND-gate decoder.
module cam_addr_decoder #(
  parameter int AW = 5
) (
  input  logic [AW-1:0]      addr,
  input  logic               we,
  output logic [2**AW-1:0]   word_sel
);
  always_comb begin
    word_sel = '0;
    if (we) word_sel[addr] = 1'b1;
  end
endmodule
