// tb_swc: loads the two nibble tables of a single word comparator for a set
// of stored bytes and checks cout = cin & (din == stored byte) for every
// input byte and both carry-in values.
module tb_swc;
  logic clk = 0, rst = 1, we = 0, cin = 0, cout;
  logic [1:0] wbits = 0;
  logic [7:0] din = 0;
  int checks = 0, failures = 0;

  swc dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(input logic [7:0] b);
    for (int c = 15; c >= 0; c--) begin
      @(negedge clk); we = 1;
      wbits = {b[7:4] == 4'(c), b[3:0] == 4'(c)};
    end
    @(negedge clk); we = 0;
  endtask

  initial begin
    logic [7:0] stored;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 12; t++) begin
      stored = (t == 0) ? 8'h00 : (t == 1) ? 8'hFF : 8'($urandom);
      load(stored);
      for (int x = 0; x < 256; x++)
        for (int ci = 0; ci < 2; ci++) begin
          din = 8'(x); cin = 1'(ci); #1; checks++;
          if (cout !== (cin && din == stored)) begin
            failures++; $display("stored=%h din=%h cin=%b cout=%b", stored, din, cin, cout);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
