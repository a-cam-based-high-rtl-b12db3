// tb_nibble_lut: loads the 16-bit table for every nibble value (and an
// all-ones don't-care table) the way the CAM writes it, counting down from 15,
// and checks that exactly the stored value selects a 1. Also checks reset.
module tb_nibble_lut;
  logic clk = 0, rst = 1, we = 0, d = 0;
  logic [3:0] sel = 0;
  logic q;
  int checks = 0, failures = 0;

  nibble_lut dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(input int v);   // v = 16 means don't care
    for (int c = 15; c >= 0; c--) begin
      @(negedge clk); we = 1; d = (v == 16) || (c == v);
    end
    @(negedge clk); we = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int s = 0; s < 16; s++) begin
      sel = 4'(s); #1; checks++;
      if (q !== 1'b0) begin failures++; $display("reset table not clear at %0d", s); end
    end
    for (int v = 0; v <= 16; v++) begin
      load(v);
      for (int s = 0; s < 16; s++) begin
        sel = 4'(s); #1; checks++;
        if (q !== ((v == 16) || (s == v))) begin
          failures++; $display("v=%0d sel=%0d q=%b", v, s, q);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
