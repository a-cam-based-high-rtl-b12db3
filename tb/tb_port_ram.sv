// tb_port_ram: writes random entries to every address, reads them back in a
// shuffled order and checks the entry appears one clock after the read and
// is held until the next read.
module tb_port_ram;
  import vnp_pkg::*;
  localparam int DEPTH = 32, AW = 5;
  logic clk = 0, we = 0, re = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  port_entry_t wdata = '0, rdata;
  port_entry_t ref_mem [DEPTH];
  int checks = 0, failures = 0;

  port_ram #(.DEPTH(DEPTH), .AW(AW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); we = 1; waddr = AW'(i); wdata = port_entry_t'(8'($urandom)); ref_mem[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 100; t++) begin
      a = $urandom_range(DEPTH-1);
      @(negedge clk); re = 1; raddr = AW'(a);
      @(negedge clk); re = 0; raddr = ~raddr; checks++;
      if (rdata !== ref_mem[a]) begin failures++; $display("addr %0d got %h exp %h", a, rdata, ref_mem[a]); end
      @(negedge clk); checks++;
      if (rdata !== ref_mem[a]) begin failures++; $display("addr %0d not held", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
