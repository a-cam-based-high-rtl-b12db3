// tb_cam_write_counter: starts writes and checks that `we` stays high for
// exactly 16 clocks with the count running 15 down to 0, that address,
// pattern and header length are latched at the start, that `write_rdy` is low meanwhile and
// that a request during a write is ignored.
module tb_cam_write_counter;
  localparam int WIDTH = 256, AW = 5, CW = 7;
  logic clk = 0, rst = 1, write_en = 0, we, write_rdy;
  logic [AW-1:0] addr_in = '0, addr;
  logic [WIDTH-1:0] pattern_in = '0, pattern;
  logic [3:0] cnt;
  logic [CW-1:0] care_in = '0, care;
  int checks = 0, failures = 0;

  cam_write_counter #(.WIDTH(WIDTH), .AW(AW), .CW(CW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    logic [AW-1:0] a;
    logic [WIDTH-1:0] p;
    logic [CW-1:0] h;
    repeat (2) @(negedge clk);
    rst = 0;
    chk(write_rdy && !we, "idle after reset");
    for (int t = 0; t < 5; t++) begin
      a = AW'($urandom); p = {8{$urandom}}; h = 7'($urandom_range(64));
      @(negedge clk); write_en = 1; addr_in = a; pattern_in = p; care_in = h;
      @(negedge clk); write_en = (t % 2); addr_in = ~a; pattern_in = ~p; care_in = ~h;
      for (int c = 15; c >= 0; c--) begin
        chk(we && !write_rdy, "we during write");
        chk(cnt == 4'(c), $sformatf("cnt=%0d exp %0d", cnt, c));
        chk(addr == a && pattern == p && care == h, "latched address, pattern, length");
        @(negedge clk); write_en = 0;
      end
      chk(!we && write_rdy, "idle after 16 clocks");
      repeat (3) @(negedge clk);
      chk(!we && write_rdy, "still idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
