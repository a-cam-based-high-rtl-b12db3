// tb_cam: loads all 32 entries with distinct random 20-byte headers through
// the write port and checks the write takes 16 clocks (cam_write_rdy low).
// Then searches every stored header with a random payload (don't care) and
// checks address and Match Hit exactly 2 clocks after the key; searches a
// header that is stored nowhere and checks no Match Hit; searches back to back
// to check one search per clock; checks that a rewritten entry matches
// its new header only; and stores patterns with other header lengths (8
// bytes, and the whole 32-byte packet) to check that exactly the first
// `cam_hdr_bytes` bytes are compared.
module tb_cam;
  localparam int WIDTH = 256, DEPTH = 32, AW = 5, HB = 20;
  logic clk = 0, rst = 1, cam_write_en = 0, cam_match_en = 0, cam_match, cam_write_rdy;
  logic [AW-1:0] cam_wordaddr_in = '0, cam_wordaddr_out;
  logic [WIDTH-1:0] cam_data = '0;
  logic [5:0] cam_hdr_bytes = 6'(HB);
  int checks = 0, failures = 0;

  cam #(.WIDTH(WIDTH), .DEPTH(DEPTH), .AW(AW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [8*HB-1:0] hdr [DEPTH];

  function automatic logic [WIDTH-1:0] with_payload(input logic [8*HB-1:0] h);
    return {{3{$urandom}}, h};
  endfunction

  task automatic write_pattern(input int a, input logic [WIDTH-1:0] p, input int len);
    int busy = 0;
    @(negedge clk); cam_write_en = 1; cam_wordaddr_in = AW'(a); cam_data = p; cam_hdr_bytes = 6'(len);
    @(negedge clk); cam_write_en = 0; cam_data = '0; cam_hdr_bytes = '0;
    while (!cam_write_rdy) begin busy++; @(negedge clk); end
    chk(busy == 16, $sformatf("write took %0d clocks", busy));
  endtask

  task automatic write_entry(input int a, input logic [8*HB-1:0] h);
    write_pattern(a, with_payload(h), HB);
  endtask

  // key applied at one negedge; result checked 2 rising edges later
  task automatic search(input logic [WIDTH-1:0] k, input bit exp_hit, input int exp_addr);
    @(negedge clk); cam_data = k; cam_match_en = 1;
    @(negedge clk); cam_match_en = 0;
    @(negedge clk);
    chk(cam_match == exp_hit, $sformatf("hit=%b exp %b", cam_match, exp_hit));
    if (exp_hit) chk(cam_wordaddr_out == AW'(exp_addr), $sformatf("addr=%0d exp %0d", cam_wordaddr_out, exp_addr));
  endtask

  initial begin
    logic [8*HB-1:0] miss;
    repeat (2) @(negedge clk);
    rst = 0;
    chk(cam_write_rdy, "ready after reset");
    for (int e = 0; e < DEPTH; e++) begin
      hdr[e] = {$urandom, $urandom, $urandom, $urandom, $urandom};
      write_entry(e, hdr[e]);
    end
    for (int e = 0; e < DEPTH; e++) search(with_payload(hdr[e]), 1, e);
    miss = hdr[7]; miss[13] = !miss[13];
    search(with_payload(miss), 0, 0);
    // back to back: a new key every clock, results stream out 2 clocks later
    fork
      for (int e = 0; e < DEPTH; e++) begin
        @(negedge clk); cam_data = with_payload(hdr[DEPTH-1-e]); cam_match_en = 1;
      end
      begin
        @(negedge clk); @(negedge clk);
        for (int e = 0; e < DEPTH; e++) begin
          @(negedge clk);
          chk(cam_match && cam_wordaddr_out == AW'(DEPTH-1-e), "pipelined search");
        end
      end
    join
    cam_match_en = 0;
    // rewrite entry 5 with the miss header
    write_entry(5, miss);
    search(with_payload(miss), 1, 5);
    search(with_payload(hdr[5]), 0, 0);
    // an 8-byte pattern in entry 9: bytes 8 and up are ignored, bytes 0-7 count
    begin
      logic [WIDTH-1:0] p, k;
      p = {8{$urandom}};
      write_pattern(9, p, 8);
      k = {{6{$urandom}}, p[63:0]};
      search(k, 1, 9);
      k[63] = !k[63];
      search(k, 0, 0);
      // the whole packet as pattern in entry 10: a change in the last byte misses
      p = {8{$urandom}};
      write_pattern(10, p, 32);
      search(p, 1, 10);
      k = p; k[WIDTH-1] = !k[WIDTH-1];
      search(k, 0, 0);
      // a zero-length pattern in entry 0 matches everything
      write_pattern(0, {8{$urandom}}, 0);
      search({8{$urandom}}, 1, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
