// classifier: the packet classifier half of the classifier-scheduler.
//
// It holds the CAM and the splitter/combiner and runs one packet at a time:
//   IDLE   - enable check: a packet is taken (`in_valid` & `in_ready`) only
//            when `match_en` is high, the CAM is not writing and no CAM write
//            starts in the same clock. The packet is searched in the CAM in
//            that clock and kept, with its `vnp` flag, in the data register.
//   WAIT   - the CAM's match bus is registered.
//   CHECK  - Match Hit check: no hit drops the packet (`drop` pulses). On a
//            hit the CAM address goes to the scheduler buffer (`addr_valid`);
//            a VNP packet is split (header to the cache, payload to the PEs),
//            a normal packet only gets its hop count updated.
//   PE     - waits for the PEs to return the payload, which is merged behind
//            the cached header.
//   FWD    - offers the packet to the scheduler until `fwd_ready`.
// A CAM pattern compares its first `cam_hdr_bytes` bytes (given with each
// write); HDR_BYTES is where a VNP packet is split into header and payload.
// A packet thus reaches the scheduler 3 clocks after it is taken when no PE
// is involved. The CAM write port is brought out so the control plane can load
// patterns; `data` carries both packets and patterns, as in the document's
// prototype. Updating the hop count of non-VNP packets follows the document's
// pseudo code; treating `vnp` as a per-packet input follows its prototype.
module classifier
  import vnp_pkg::*;
#(
  parameter int PKT_W        = 256,
  parameter int HDR_BYTES    = 20,
  parameter int CAM_DEPTH    = 32,
  parameter int CAM_AW       = 5,
  parameter int HB_W         = $clog2(PKT_W/8 + 1)
) (
  input  logic              clk,
  input  logic              rst,
  // packet input
  input  logic [PKT_W-1:0]  data,
  input  logic              vnp,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic              match_en,
  // CAM pattern write from the control plane (pattern on `data`)
  input  logic              cam_write_en,
  input  logic [CAM_AW-1:0] cam_wordaddr_in,
  input  logic [HB_W-1:0]   cam_hdr_bytes,
  output logic              cam_write_rdy,
  // CAM result, also visible outside
  output logic [CAM_AW-1:0] cam_wordaddr_out,
  output logic              cam_match,
  output logic              drop,
  // to the scheduler buffer
  output logic              addr_valid,
  output logic [CAM_AW-1:0] addr,
  output logic              fwd_valid,
  output logic [PKT_W-1:0]  fwd_pkt,
  input  logic              fwd_ready,
  // processing elements
  output logic [PKT_W-1:0]  pe_out,
  output logic              pe_out_valid,
  input  logic [PKT_W-1:0]  pe_in,
  input  logic              pe_in_valid
);
  typedef enum logic [2:0] {S_IDLE, S_WAIT, S_CHECK, S_PE, S_FWD} state_e;
  state_e state;

  logic [PKT_W-1:0] pkt_reg;
  logic             vnp_reg;
  logic             accept, split;
  logic [PKT_W-1:0] merged;
  logic             merged_valid;

  assign in_ready = (state == S_IDLE) && match_en && cam_write_rdy && !cam_write_en;
  assign accept   = in_valid && in_ready;

  cam #(.WIDTH(PKT_W), .DEPTH(CAM_DEPTH), .AW(CAM_AW), .BW(HB_W)) u_cam (
    .clk, .rst,
    .cam_write_en    (cam_write_en),
    .cam_wordaddr_in,
    .cam_data        (data),
    .cam_hdr_bytes,
    .cam_match_en    (accept),
    .cam_wordaddr_out,
    .cam_match,
    .cam_write_rdy
  );

  assign split      = (state == S_CHECK) && cam_match && vnp_reg;
  assign drop       = (state == S_CHECK) && !cam_match;
  assign addr_valid = (state == S_CHECK) && cam_match;
  assign addr       = cam_wordaddr_out;

  split_combine #(.PKT_W(PKT_W), .HDR_BYTES(HDR_BYTES)) u_sc (
    .clk, .rst, .split, .pkt(pkt_reg), .pe_out, .pe_out_valid,
    .pe_in, .pe_in_valid(pe_in_valid && state == S_PE),
    .merged, .merged_valid
  );

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state   <= S_IDLE;
      pkt_reg <= '0;
      vnp_reg <= 1'b0;
      fwd_pkt <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (accept) begin
          pkt_reg <= data;
          vnp_reg <= vnp;
          state   <= S_WAIT;
        end
        S_WAIT:  state <= S_CHECK;
        S_CHECK: begin
          if (!cam_match)   state <= S_IDLE;
          else if (vnp_reg) state <= S_PE;
          else begin
            fwd_pkt <= PKT_W'(hop_update(packet_t'(pkt_reg)));
            state   <= S_FWD;
          end
        end
        S_PE: if (merged_valid) begin
          fwd_pkt <= merged;
          state   <= S_FWD;
        end
        S_FWD: if (fwd_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign fwd_valid = (state == S_FWD);
endmodule
