// class_sched: CAM-based combined packet classifier and scheduler.
//
// Packets (32 bytes, header in the first 20) enter on `data` with `in_valid`
// and are taken one at a time when `in_ready` is high. The classifier looks
// the header up in a 32-entry CAM; a packet with no match is dropped, a
// matching one is forwarded to the scheduler, VNP packets after a round trip
// of their payload through the processing elements (`pe_out` / `pe_in`). The
// CAM address selects a port entry in the port RAM; the scheduler queues the
// packet in its FIFO and sends it to output ports `termn[0..3]` when the QoS
// of those ports is good, single-, multi- or broadcast as the entry and the
// broadcast mode say, re-queuing it at the FIFO tail when they are not.
// The control plane loads CAM patterns (`cam_write_en`, 16 clocks each, each
// with its header length `cam_hdr_bytes`) and
// port entries (`ram_we`) and drives `qos` and `bcast`.
// Port names follow the document's prototype where it has them (its ports
// termn11..termn14 are the array `termn`); handshakes, the per-port QoS
// vector and the port-entry format are this design's own.
module class_sched
  import vnp_pkg::*;
#(
  parameter int PKT_W       = 256,
  parameter int HDR_BYTES   = 20,
  parameter int CAM_DEPTH   = 32,
  parameter int CAM_AW      = 5,
  parameter int FIFO_DEPTH  = 16,
  parameter int NET_UP_TIME = 8
) (
  input  logic               clk,
  input  logic               rst,
  input  packet_t            data,
  input  logic               in_valid,
  output logic               in_ready,
  input  logic               vnp,
  input  logic               cam_match_en,
  input  logic               cam_write_en,
  input  logic [CAM_AW-1:0]  cam_wordaddr_in,
  input  logic [$clog2(PKT_W/8+1)-1:0] cam_hdr_bytes,
  output logic               cam_write_rdy,
  output logic [CAM_AW-1:0]  cam_wordaddr_out,
  output logic               cam_match,
  input  logic               ram_we,
  input  logic [CAM_AW-1:0]  ram_waddr,
  input  port_entry_t        ram_wdata,
  input  logic [NPORTS-1:0]  qos,
  input  logic               bcast,
  output packet_t            pe_out,
  output logic               pe_out_valid,
  input  packet_t            pe_in,
  input  logic               pe_in_valid,
  output packet_t            termn [NPORTS],
  output logic [NPORTS-1:0]  termn_valid,
  output logic               drop,
  output logic               requeue,
  output logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count
);
  logic              addr_valid, fwd_valid, fwd_ready;
  logic [CAM_AW-1:0] addr;
  packet_t           fwd_pkt;

  classifier #(.PKT_W(PKT_W), .HDR_BYTES(HDR_BYTES), .CAM_DEPTH(CAM_DEPTH), .CAM_AW(CAM_AW)) u_cls (
    .clk, .rst, .data, .vnp, .in_valid, .in_ready, .match_en(cam_match_en),
    .cam_write_en, .cam_wordaddr_in, .cam_hdr_bytes, .cam_write_rdy, .cam_wordaddr_out, .cam_match,
    .drop, .addr_valid, .addr, .fwd_valid, .fwd_pkt, .fwd_ready,
    .pe_out, .pe_out_valid, .pe_in, .pe_in_valid
  );

  scheduler #(.CAM_DEPTH(CAM_DEPTH), .CAM_AW(CAM_AW), .FIFO_DEPTH(FIFO_DEPTH),
              .NET_UP_TIME(NET_UP_TIME)) u_sch (
    .clk, .rst, .addr_valid, .addr, .fwd_valid, .fwd_pkt, .fwd_ready,
    .ram_we, .ram_waddr, .ram_wdata, .qos, .bcast, .termn, .termn_valid,
    .requeue, .fifo_count
  );
endmodule
