// tb_cam_write_data: random patterns and header lengths at every count; the
// bit of a header nibble must be (nibble == count), the bit of any nibble
// behind the header always 1. Lengths 0, 40 (20 bytes) and 64 are included.
module tb_cam_write_data;
  localparam int WIDTH = 256, CW = 7;
  logic [WIDTH-1:0] pattern;
  logic [3:0] cnt;
  logic [CW-1:0] care;
  logic [WIDTH/4-1:0] data;
  int checks = 0, failures = 0;

  cam_write_data #(.WIDTH(WIDTH), .CW(CW)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 50; t++) begin
      pattern = {8{$urandom}};
      care = (t == 0) ? 7'd0 : (t == 1) ? 7'd64 : (t % 3 == 0) ? 7'd40 : 7'($urandom_range(64));
      for (int c = 0; c < 16; c++) begin
        cnt = 4'(c); #1;
        for (int i = 0; i < WIDTH/4; i++) begin
          checks++;
          if (data[i] !== ((i >= int'(care)) || (int'(pattern[4*i +: 4]) == c))) begin
            failures++; $display("nibble %0d cnt %0d care %0d", i, c, care);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
