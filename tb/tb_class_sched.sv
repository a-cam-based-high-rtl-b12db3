// tb_class_sched: end-to-end test of the classifier-scheduler at its default
// size (32-entry CAM of 256-bit patterns, 20-byte headers, 4 ports, 16-deep
// FIFO).
//
// The testbench acts as control plane (loads the 32 CAM patterns and port
// entries, drives QoS and broadcast mode) and as the processing elements (a
// stand-in that shifts the payload left by two bits after a random delay).
// Phases:
//   1. a burst of 32 packets, one per pattern, QoS good, mixed VNP/normal,
//      plus packets whose header matches nothing; the first packet's latency
//      from being taken to leaving a port is checked (4 clocks);
//   2. congestion: QoS of each port toggles randomly, so packets are moved to
//      the FIFO tail, the FIFO fills and the classifier stalls; the enable
//      input is dropped for a while and one CAM pattern is rewritten while
//      traffic runs, with a 12-byte header, so later packets for it match
//      whatever their bytes 12-19 hold;
//   3. broadcast mode: every packet leaves on all ports.
// A scoreboard holds each expected packet (hop count updated, payload
// processed for VNP packets) with its target ports; every port output must
// match an outstanding packet and every packet must reach exactly its ports.
// Each mechanism is counted and must occur at least once.
module tb_class_sched;
  import vnp_pkg::*;
  localparam int HB = 20, HW = 8*HB, DEPTH = 32, AW = 5, FD = 16;

  logic clk = 0, rst = 1;
  packet_t data = '0, pe_out, pe_in = '0;
  logic in_valid = 0, in_ready, vnp = 0, cam_match_en = 0, cam_write_en = 0, cam_write_rdy;
  logic [AW-1:0] cam_wordaddr_in = '0, cam_wordaddr_out, ram_waddr = '0;
  logic [5:0] cam_hdr_bytes = '0;
  logic cam_match, ram_we = 0, bcast = 0, pe_out_valid, pe_in_valid = 0, drop, requeue;
  port_entry_t ram_wdata = '0;
  logic [NPORTS-1:0] qos = '1, termn_valid;
  packet_t termn [NPORTS];
  logic [$clog2(FD+1)-1:0] fifo_count;

  class_sched dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_drop = 0, n_vnp = 0, n_plain = 0, n_requeue = 0, n_full = 0, n_wr_stall = 0,
      n_en_block = 0, n_short = 0, n_single = 0, n_multi = 0, n_broad = 0, n_bmode = 0, n_out = 0;

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------- processing-element stand-in ----------------
  initial begin
    packet_t p;
    forever begin
      @(negedge clk);
      if (pe_out_valid) begin
        p = pe_out;
        repeat ($urandom_range(0, 4)) @(negedge clk);
        pe_in = p << 2; pe_in_valid = 1;
        @(negedge clk); pe_in_valid = 0;
      end
    end
  end

  // ---------------- reference tables and scoreboard ----------------
  logic [HW-1:0] hdr [DEPTH];
  int            hlen [DEPTH];   // compared header bytes of each pattern
  port_entry_t   ent [DEPTH];
  packet_t           sb_pkt [$];
  logic [NPORTS-1:0] sb_tgt [$];
  logic [NPORTS-1:0] sb_got [$];
  int                sb_sent [$];
  int first_taken = -1, first_out = -1, cyc = 0;

  always @(posedge clk) cyc++;

  function automatic logic [NPORTS-1:0] ref_tgt(port_entry_t e, logic b);
    if (b || e.mode == CAST_BROAD) return '1;
    if (e.mode == CAST_MULTI) return e.mask;
    return NPORTS'(1) << e.port;
  endfunction

  // port monitor
  initial begin
    bit found;
    forever begin
      @(negedge clk);
      for (int i = 0; i < NPORTS; i++) if (termn_valid[i]) begin
        found = 0;
        n_out++;
        if (first_out < 0) first_out = cyc;
        for (int k = 0; k < sb_pkt.size(); k++)
          if (!found && sb_pkt[k] == termn[i] && sb_tgt[k][i] && !sb_got[k][i]) begin
            found = 1; sb_got[k][i] = 1;
            if (sb_got[k] == sb_tgt[k]) begin
              sb_pkt.delete(k); sb_tgt.delete(k); sb_got.delete(k); sb_sent.delete(k);
            end
          end
        chk(found, $sformatf("port %0d output matches an expected packet", i));
      end
      if (requeue) n_requeue++;
      if (fifo_count == FD) n_full++;
    end
  end

  task automatic cam_write(input int a, input logic [HW-1:0] h, input int len);
    while (!cam_write_rdy) @(negedge clk);
    cam_write_en = 1; cam_wordaddr_in = AW'(a); data = {96'h0, h}; cam_hdr_bytes = 6'(len);
    hlen[a] = len;
    @(negedge clk); cam_write_en = 0; data = '0; cam_hdr_bytes = '0;
  endtask

  // offer one packet; returns after it has been taken
  task automatic send(input int e, input bit hit, input bit isv);
    packet_t p, exp;
    logic [7:0] ttl;
    p = {$urandom, $urandom, $urandom, hdr[e]};
    if (!hit) p[$urandom_range(8*hlen[e]-1)] ^= 1'b1;
    else if (hlen[e] < HB) begin   // bytes behind a short pattern are free
      for (int b = hlen[e]; b < HB; b++) p[8*b +: 8] = 8'($urandom);
      n_short++;
    end
    data = p; vnp = isv; in_valid = 1;
    #1;
    while (!in_ready) begin
      if (!cam_write_rdy) n_wr_stall++;
      if (!cam_match_en)  n_en_block++;
      @(negedge clk); #1;
    end
    if (first_taken < 0) first_taken = cyc + 1;   // number of the clock edge that takes it
    @(negedge clk); in_valid = 0;
    if (!hit) begin n_drop++; return; end
    exp = p;
    ttl = p[8*TTL_BYTE +: 8];
    exp[8*TTL_BYTE +: 8] = (ttl == 0) ? 8'd0 : ttl - 8'd1;
    if (isv) begin exp[PKT_BITS-1:HW] = {p[PKT_BITS-1-2:HW], 2'b00}; n_vnp++; end
    else n_plain++;
    if (bcast) n_bmode++;
    else case (ent[e].mode)
      CAST_SINGLE: n_single++;
      CAST_MULTI:  n_multi++;
      default:     n_broad++;
    endcase
    sb_pkt.push_back(exp); sb_tgt.push_back(ref_tgt(ent[e], bcast)); sb_got.push_back('0);
    sb_sent.push_back(cyc);
  endtask

  task automatic drain(input int limit);
    int n = 0;
    while (sb_pkt.size() > 0 && n < limit) begin @(negedge clk); n++; end
    chk(sb_pkt.size() == 0, $sformatf("%0d packets never delivered", sb_pkt.size()));
    repeat (20) @(negedge clk);   // let drops and stragglers settle
  endtask

  initial begin
    int e, drops_seen;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    // control plane: CAM patterns and port table
    for (int i = 0; i < DEPTH; i++) begin
      hdr[i] = {$urandom, $urandom, $urandom, $urandom, $urandom};
      hdr[i][8*TTL_BYTE +: 8] = 8'($urandom_range(1, 255));
      cam_write(i, hdr[i], HB);
      ent[i].mode = cast_mode_e'(i % 3);
      ent[i].port = PORT_W'(i / 3);
      ent[i].mask = NPORTS'((i % 15) + 1);
      ram_we = 1; ram_waddr = AW'(i); ram_wdata = ent[i];
      @(negedge clk); ram_we = 0;
    end
    while (!cam_write_rdy) @(negedge clk);
    cam_match_en = 1;

    // phase 1: burst of 32 packets, QoS good
    for (int i = 0; i < DEPTH; i++) begin
      send(i, 1, (i % 2 == 1));
      if (i == 0) begin
        while (first_out < 0) @(negedge clk);
        chk(first_out - first_taken == 4, $sformatf("latency taken->port %0d clocks", first_out - first_taken));
      end
      if (i % 8 == 3) send($urandom_range(DEPTH-1), 0, 0);
    end
    drain(2000);

    // phase 2: congestion, enable toggling, a pattern rewrite under traffic
    fork
      begin
        for (int k = 0; k < 60; k++) begin
          qos = NPORTS'($urandom);
          repeat ($urandom_range(20, 80)) @(negedge clk);
        end
        qos = '1;
      end
      begin
        for (int t = 0; t < 120; t++) begin
          if (t == 40) begin
            cam_match_en = 0;
            repeat (5) begin n_en_block++; chk(!in_ready, "enable low blocks input"); @(negedge clk); end
            cam_match_en = 1;
          end
          if (t == 70) begin
            hdr[9] = {$urandom, $urandom, $urandom, $urandom, $urandom};
            cam_write(9, hdr[9], 12);
          end
          e = $urandom_range(DEPTH-1);
          send(e, ($urandom_range(5) != 0), $urandom_range(1));
        end
      end
    join
    qos = '1;
    drain(20000);

    // phase 3: broadcast mode
    bcast = 1;
    repeat (3) @(negedge clk);
    for (int t = 0; t < 40; t++) send($urandom_range(DEPTH-1), 1, $urandom_range(1));
    drain(4000);
    bcast = 0;

    chk(n_drop > 0 && n_vnp > 0 && n_plain > 0 && n_requeue > 0 && n_full > 0 &&
        n_wr_stall > 0 && n_en_block > 0 && n_short > 0 && n_single > 0 && n_multi > 0 && n_broad > 0 && n_bmode > 0,
        "every mechanism exercised");
    $display("mechanisms: drop=%0d vnp=%0d normal=%0d requeue=%0d fifo_full_clocks=%0d cam_write_stall=%0d enable_block=%0d short_header=%0d single=%0d multi=%0d broadcast_entry=%0d broadcast_mode=%0d port_outputs=%0d",
             n_drop, n_vnp, n_plain, n_requeue, n_full, n_wr_stall, n_en_block, n_short, n_single, n_multi, n_broad, n_bmode, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
