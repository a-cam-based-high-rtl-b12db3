// tb_sched_fifo: random writes, reads, simultaneous read+write and head-to-
// tail moves against a queue model; checks head, empty, full and count every
// clock, and that writes when full and reads when empty are ignored.
module tb_sched_fifo;
  localparam int DEPTH = 16, WIDTH = 40;
  logic clk = 0, rst = 1, wr_en = 0, rd_en = 0, empty, full;
  logic [WIDTH-1:0] din = '0, dout;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic [WIDTH-1:0] q [$];
  int checks = 0, failures = 0, n_full = 0, n_requeue = 0;

  sched_fifo #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int op;
    logic [WIDTH-1:0] h;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 3000; t++) begin
      // compare state
      checks++;
      if (empty != (q.size() == 0) || full != (q.size() == DEPTH) || int'(count) != q.size() ||
          (q.size() > 0 && dout !== q[0])) begin
        failures++; $display("t=%0d size=%0d count=%0d empty=%b full=%b", t, q.size(), count, empty, full);
      end
      if (full) n_full++;
      // bias fill and drain phases
      op = $urandom_range(99);
      wr_en = ((t / 200) % 2 == 0) ? (op < 70) : (op < 30);
      rd_en = ($urandom_range(99) < 45);
      din = {$urandom, 8'($urandom)};
      if (wr_en && rd_en && q.size() > 0 && $urandom_range(3) == 0) din = dout;
      // model
      h = (q.size() > 0) ? q[0] : '0;
      if (rd_en && q.size() > 0) begin
        void'(q.pop_front());
        if (wr_en) begin q.push_back(din); if (din == h) n_requeue++; end
      end else if (wr_en && q.size() < DEPTH) q.push_back(din);
      @(negedge clk);
    end
    checks++;
    if (n_full == 0 || n_requeue == 0) begin failures++; $display("full=%0d requeue=%0d", n_full, n_requeue); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
