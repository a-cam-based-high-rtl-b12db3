// split_combine: splitter and combiner around the processing elements (PEs).
//
// On `split` the header (bytes 0..HDR_BYTES-1) of `pkt`, with its hop count
// (time-to-live) updated, is stored in the header cache, and the packet with
// its header bytes cleared is sent on `pe_out` with `pe_out_valid` for one
// clock; the payload stays in its packet byte positions. When the PEs return
// their result (`pe_in_valid`), the payload bytes of `pe_in` are merged
// behind the cached header and presented on `merged` with `merged_valid` for
// one clock. One packet is in flight at a time, as in the document.
// The PE port is a full packet wide, like the prototype's; the header bytes
// of `pe_in` are not used, since the cached header replaces them (lint
// reports those bits as unused).
module split_combine
  import vnp_pkg::*;
#(
  parameter int PKT_W     = 256,
  parameter int HDR_BYTES = 20
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             split,
  input  logic [PKT_W-1:0] pkt,
  output logic [PKT_W-1:0] pe_out,
  output logic             pe_out_valid,
  input  logic [PKT_W-1:0] pe_in,
  input  logic             pe_in_valid,
  output logic [PKT_W-1:0] merged,
  output logic             merged_valid
);
  localparam int HW = 8 * HDR_BYTES;

  logic [HW-1:0]    hdr_cache;
  logic [HW-1:0]    upd;   // header with the hop count updated

  assign upd = HW'(hop_update(packet_t'(pkt)));

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      hdr_cache    <= '0;
      pe_out       <= '0;
      pe_out_valid <= 1'b0;
      merged       <= '0;
      merged_valid <= 1'b0;
    end else begin
      pe_out_valid <= 1'b0;
      merged_valid <= 1'b0;
      if (split) begin
        hdr_cache    <= upd;
        pe_out       <= {pkt[PKT_W-1:HW], {HW{1'b0}}};
        pe_out_valid <= 1'b1;
      end
      if (pe_in_valid) begin
        merged       <= {pe_in[PKT_W-1:HW], hdr_cache};
        merged_valid <= 1'b1;
      end
    end
  end
endmodule
