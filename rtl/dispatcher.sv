// dispatcher: QoS check, mode check and packet forwarding to the ports.
//
// Each clock, if the FIFO holds a packet and no wait is pending, the head is
// examined. Mode check: its target ports are all ports when broadcast mode is
// on (`bcast`) or the entry says broadcast, the entry's mask for multicast,
// or its single port. QoS check: if the QoS registry reports every target
// port good, the packet is written to those ports (`termn[i]`, `termn_valid`
// bit i high for one clock, the clock after the pop) and popped. Otherwise the
// packet is moved to the tail of the FIFO (`requeue`, a pop plus a write
// back) and the dispatcher waits NET_UP_TIME clocks, the network up time,
// before it looks at the FIFO again. The registry samples `qos` and `bcast`
// every clock, so they act one clock after they change. QoS per port and
// the length of the wait are this design's choices.
module dispatcher
  import vnp_pkg::*;
#(
  parameter int NET_UP_TIME = 8
) (
  input  logic               clk,
  input  logic               rst,
  input  sched_entry_t       head,
  input  logic               empty,
  input  logic [NPORTS-1:0]  qos,
  input  logic               bcast,
  output logic               pop,
  output logic               requeue,
  output packet_t            termn [NPORTS],
  output logic [NPORTS-1:0]  termn_valid
);
  localparam int WW = $clog2(NET_UP_TIME + 1);

  logic [NPORTS-1:0] qos_reg;
  logic              bcast_reg;
  logic [WW-1:0]     wait_cnt;
  logic [NPORTS-1:0] tgt;
  logic              go, ok;

  assign tgt     = target_ports(head.dest, bcast_reg);
  assign go      = !empty && (wait_cnt == '0);
  assign ok      = (tgt & ~qos_reg) == '0;
  assign pop     = go;
  assign requeue = go && !ok;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      qos_reg     <= '0;
      bcast_reg   <= 1'b0;
      wait_cnt    <= '0;
      termn_valid <= '0;
      for (int i = 0; i < NPORTS; i++) termn[i] <= '0;
    end else begin
      qos_reg     <= qos;
      bcast_reg   <= bcast;
      termn_valid <= '0;
      if (go && ok) begin
        termn_valid <= tgt;
        for (int i = 0; i < NPORTS; i++)
          if (tgt[i]) termn[i] <= head.pkt;
      end
      if (requeue)              wait_cnt <= WW'(NET_UP_TIME);
      else if (wait_cnt != '0)  wait_cnt <= wait_cnt - WW'(1);
    end
  end
endmodule
