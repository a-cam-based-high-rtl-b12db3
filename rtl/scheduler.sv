// scheduler: the packet scheduler half of the classifier-scheduler.
//
// Scheduler buffer: when the classifier reports a Match Hit it hands over
// the CAM address (`addr_valid`), and the port RAM is read with it; the entry
// is held until the next address. This happens while the packet itself is
// still being split, processed and merged, so the lookup runs in parallel
// with the PEs as the document intends. When the classifier then offers the
// packet (`fwd_valid`), it is written with its port entry into the FIFO;
// `fwd_ready` is low while the FIFO is full or a re-queue uses the FIFO's
// write port in that clock. The dispatcher takes packets from the FIFO head
// in order, forwarding them to their ports when QoS allows and moving them to
// the tail otherwise. The RAM's write port is the control plane's.
module scheduler
  import vnp_pkg::*;
#(
  parameter int CAM_DEPTH   = 32,
  parameter int CAM_AW      = 5,
  parameter int FIFO_DEPTH  = 16,
  parameter int NET_UP_TIME = 8
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               addr_valid,
  input  logic [CAM_AW-1:0]  addr,
  input  logic               fwd_valid,
  input  packet_t            fwd_pkt,
  output logic               fwd_ready,
  input  logic               ram_we,
  input  logic [CAM_AW-1:0]  ram_waddr,
  input  port_entry_t        ram_wdata,
  input  logic [NPORTS-1:0]  qos,
  input  logic               bcast,
  output packet_t            termn [NPORTS],
  output logic [NPORTS-1:0]  termn_valid,
  output logic               requeue,
  output logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count
);
  port_entry_t  dest;
  sched_entry_t head, din;
  logic         empty, full, pop, push;

  port_ram #(.DEPTH(CAM_DEPTH), .AW(CAM_AW)) u_ram (
    .clk, .we(ram_we), .waddr(ram_waddr), .wdata(ram_wdata),
    .re(addr_valid), .raddr(addr), .rdata(dest)
  );

  assign fwd_ready = !full && !requeue;
  assign push      = fwd_valid && fwd_ready;
  assign din       = requeue ? head : '{dest: dest, pkt: fwd_pkt};

  sched_fifo #(.DEPTH(FIFO_DEPTH), .WIDTH($bits(sched_entry_t))) u_fifo (
    .clk, .rst, .wr_en(push || requeue), .din, .rd_en(pop), .dout(head),
    .empty, .full, .count(fifo_count)
  );

  dispatcher #(.NET_UP_TIME(NET_UP_TIME)) u_disp (
    .clk, .rst, .head, .empty, .qos, .bcast, .pop, .requeue, .termn, .termn_valid
  );
endmodule
