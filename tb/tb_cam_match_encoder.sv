// tb_cam_match_encoder: random match buses (none, one or several bits set);
// one clock later the address must be the lowest set bit and match = any.
module tb_cam_match_encoder;
  localparam int DEPTH = 32, AW = 5;
  logic clk = 0, rst = 1;
  logic [DEPTH-1:0] match_bus = '0;
  logic [AW-1:0] addr;
  logic match;
  int checks = 0, failures = 0;

  cam_match_encoder #(.DEPTH(DEPTH), .AW(AW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lo;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 300; t++) begin
      case (t % 3)
        0: match_bus = '0;
        1: match_bus = DEPTH'(1) << $urandom_range(DEPTH-1);
        default: match_bus = $urandom;
      endcase
      lo = 0;
      for (int i = DEPTH-1; i >= 0; i--) if (match_bus[i]) lo = i;
      @(negedge clk); checks++;
      if (match !== (match_bus != 0) || (match && addr !== AW'(lo))) begin
        failures++; $display("bus=%h addr=%0d match=%b", match_bus, addr, match);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
