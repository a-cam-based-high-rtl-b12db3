// tb_classifier: loads 32 CAM patterns (16-clock writes), then offers a mix of
// packets: matching and non-matching headers, VNP and normal. A behavioural
// stand-in for the processing elements returns the payload inverted after a
// random delay. Checks: no-match packets are dropped; a hit reports the CAM
// address; a normal packet reaches the scheduler side with only its hop count
// updated, 3 clocks after it is taken; a VNP packet comes back as cached
// header (hop updated) plus processed payload; nothing is taken while the
// enable is low or a CAM write is running; backpressure holds the packet.
module tb_classifier;
  import vnp_pkg::*;
  localparam int PKT_W = 256, HB = 20, HW = 8*HB, DEPTH = 32, AW = 5;
  logic clk = 0, rst = 1;
  logic [PKT_W-1:0] data = '0, fwd_pkt, pe_out, pe_in = '0;
  logic vnp = 0, in_valid = 0, in_ready, match_en = 0, cam_write_en = 0, cam_write_rdy;
  logic [AW-1:0] cam_wordaddr_in = '0, cam_wordaddr_out, addr;
  logic [5:0] cam_hdr_bytes = 6'(HB);
  logic cam_match, drop, addr_valid, fwd_valid, fwd_ready = 1, pe_out_valid, pe_in_valid = 0;
  int checks = 0, failures = 0;
  int n_drop = 0, n_vnp = 0, n_plain = 0, n_bp = 0, n_en_block = 0, n_wr_block = 0;

  classifier #(.PKT_W(PKT_W), .HDR_BYTES(HB), .CAM_DEPTH(DEPTH), .CAM_AW(AW)) dut (.*);
  always #5 clk = ~clk;

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

  // processing-element stand-in: invert the payload, random latency
  initial begin
    logic [PKT_W-1:0] p;
    forever begin
      @(negedge clk);
      if (pe_out_valid) begin
        p = pe_out;
        repeat ($urandom_range(0, 5)) @(negedge clk);
        pe_in = ~p; pe_in_valid = 1;
        @(negedge clk); pe_in_valid = 0;
      end
    end
  end

  logic [HW-1:0] hdr [DEPTH];

  function automatic logic [PKT_W-1:0] hop(logic [PKT_W-1:0] p);
    logic [7:0] t = p[8*8 +: 8];
    p[8*8 +: 8] = (t == 0) ? 8'd0 : t - 8'd1;
    return p;
  endfunction

  task automatic cam_write(input int a, input logic [HW-1:0] h);
    @(negedge clk); cam_write_en = 1; cam_wordaddr_in = AW'(a); data = {96'h0, h};
    @(negedge clk); cam_write_en = 0;
    while (!cam_write_rdy) begin
      chk(!in_ready, "in_ready low while CAM writes"); n_wr_block++;
      @(negedge clk);
    end
  endtask

  initial begin
    logic [PKT_W-1:0] p, exp;
    int e, lat;
    bit hit, isv;
    repeat (2) @(negedge clk);
    rst = 0;
    match_en = 1;
    for (int i = 0; i < DEPTH; i++) begin
      hdr[i] = {$urandom, $urandom, $urandom, $urandom, $urandom};
      cam_write(i, hdr[i]);
    end
    for (int t = 0; t < 200; t++) begin
      e = $urandom_range(DEPTH-1);
      hit = ($urandom_range(3) != 0);
      isv = $urandom_range(1);
      p = {$urandom, $urandom, $urandom, hdr[e]};
      if (!hit) p[$urandom_range(HW-1)] ^= 1'b1;
      // enable check: nothing is taken while match_en is low
      if (t % 10 == 0) begin
        match_en = 0; in_valid = 1; data = p;
        repeat (3) begin #1; chk(!in_ready, "in_ready low with enable low"); n_en_block++; @(negedge clk); end
        in_valid = 0; match_en = 1;
      end
      @(negedge clk); data = p; vnp = isv; in_valid = 1;
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
      @(negedge clk); in_valid = 0; data = '0;
      lat = 1;
      fwd_ready = ($urandom_range(3) != 0);
      while (!(addr_valid || drop)) begin @(negedge clk); lat++; end
      if (!hit) begin
        chk(drop && !cam_match, "drop on miss"); n_drop++;
        @(negedge clk);
        chk(!fwd_valid, "nothing forwarded after drop");
        continue;
      end
      chk(addr == AW'(e) && cam_match && !drop, $sformatf("addr %0d exp %0d", addr, e));
      exp = hop(p);
      if (isv) exp[PKT_W-1:HW] = ~p[PKT_W-1:HW];
      @(negedge clk); lat++;
      while (!fwd_valid) begin @(negedge clk); lat++; end
      if (!isv) chk(lat == 3, $sformatf("normal packet latency %0d", lat));
      while (!fwd_ready) begin
        n_bp++; chk(fwd_valid && fwd_pkt == exp, "held under backpressure");
        @(negedge clk); fwd_ready = 1;
      end
      chk(fwd_pkt == exp, isv ? "VNP packet merged" : "normal packet hop update");
      if (isv) n_vnp++; else n_plain++;
      @(negedge clk);
      chk(!fwd_valid, "one transfer");
    end
    chk(n_drop > 0 && n_vnp > 0 && n_plain > 0 && n_bp > 0 && n_en_block > 0 && n_wr_block > 0,
        $sformatf("coverage drop=%0d vnp=%0d plain=%0d bp=%0d", n_drop, n_vnp, n_plain, n_bp));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
