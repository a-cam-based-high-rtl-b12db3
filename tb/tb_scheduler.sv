// tb_scheduler: the testbench plays the classifier side. For each packet it
// reports a CAM address (as on a Match Hit), then offers the packet until
// taken. Port entries cover single, multi and broadcast; QoS per port toggles
// randomly so packets are re-queued and the FIFO fills; a scoreboard checks
// that every packet reaches exactly its target ports, and that with QoS good
// and an empty FIFO a packet leaves its port 2 clocks after it is taken.
module tb_scheduler;
  import vnp_pkg::*;
  localparam int DEPTH = 32, AW = 5, FD = 16;
  logic clk = 0, rst = 1, addr_valid = 0, fwd_valid = 0, fwd_ready, ram_we = 0, bcast = 0, requeue;
  logic [AW-1:0] addr = '0, ram_waddr = '0;
  packet_t fwd_pkt = '0;
  port_entry_t ram_wdata = '0;
  logic [NPORTS-1:0] qos = '1, termn_valid;
  packet_t termn [NPORTS];
  logic [$clog2(FD+1)-1:0] fifo_count;
  int checks = 0, failures = 0, n_req = 0, n_full = 0, n_stall = 0, cyc = 0;

  scheduler #(.CAM_DEPTH(DEPTH), .CAM_AW(AW), .FIFO_DEPTH(FD), .NET_UP_TIME(8)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  port_entry_t ent [DEPTH];
  packet_t sb_pkt [$];
  logic [NPORTS-1:0] sb_tgt [$], sb_got [$];
  int last_out = -1;

  initial begin
    bit found;
    forever begin
      @(negedge clk);
      if (requeue) n_req++;
      if (fifo_count == FD) n_full++;
      for (int i = 0; i < NPORTS; i++) if (termn_valid[i]) begin
        found = 0; last_out = cyc;
        for (int k = 0; k < sb_pkt.size(); k++)
          if (!found && sb_pkt[k] == termn[i] && sb_tgt[k][i] && !sb_got[k][i]) begin
            found = 1; sb_got[k][i] = 1;
            if (sb_got[k] == sb_tgt[k]) begin sb_pkt.delete(k); sb_tgt.delete(k); sb_got.delete(k); end
          end
        chk(found, $sformatf("port %0d output expected", i));
      end
    end
  end

  task automatic put(input int e, output int taken);
    packet_t p = {8{$urandom}};
    @(negedge clk); addr_valid = 1; addr = AW'(e);
    @(negedge clk); addr_valid = 0; fwd_valid = 1; fwd_pkt = p;
    #1;
    while (!fwd_ready) begin n_stall++; @(negedge clk); #1; end
    taken = cyc + 1;
    sb_pkt.push_back(p);
    sb_tgt.push_back((bcast || ent[e].mode == CAST_BROAD) ? '1 :
                     (ent[e].mode == CAST_MULTI) ? ent[e].mask : NPORTS'(1) << ent[e].port);
    sb_got.push_back('0);
    @(negedge clk); fwd_valid = 0;
  endtask

  initial begin
    int tk, n;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < DEPTH; i++) begin
      ent[i] = port_entry_t'(8'($urandom));
      if (ent[i].mode == 2'd3) ent[i].mode = CAST_SINGLE;
      if (ent[i].mask == 0) ent[i].mask = 4'b0101;
      @(negedge clk); ram_we = 1; ram_waddr = AW'(i); ram_wdata = ent[i];
    end
    @(negedge clk); ram_we = 0;
    // latency with QoS good and an empty FIFO
    put(3, tk);
    repeat (4) @(negedge clk);
    chk(last_out - tk == 1, $sformatf("taken->port %0d clocks after the taking edge", last_out - tk + 1));
    // congestion
    fork
      begin
        for (int k = 0; k < 40; k++) begin qos = NPORTS'($urandom); repeat ($urandom_range(20, 60)) @(negedge clk); end
        qos = '1;
      end
      for (int t = 0; t < 200; t++) put($urandom_range(DEPTH-1), tk);
    join
    qos = '1;
    n = 0;
    while (sb_pkt.size() > 0 && n < 5000) begin @(negedge clk); n++; end
    chk(sb_pkt.size() == 0, "all packets delivered");
    // broadcast mode
    bcast = 1; repeat (2) @(negedge clk);
    for (int t = 0; t < 10; t++) put($urandom_range(DEPTH-1), tk);
    n = 0;
    while (sb_pkt.size() > 0 && n < 500) begin @(negedge clk); n++; end
    chk(sb_pkt.size() == 0, "broadcast packets delivered");
    chk(n_req > 0 && n_full > 0 && n_stall > 0, $sformatf("requeue=%0d full=%0d stall=%0d", n_req, n_full, n_stall));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
