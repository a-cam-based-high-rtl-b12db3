// tb_cam_addr_decoder: every address with and without `we`.
module tb_cam_addr_decoder;
  localparam int AW = 5;
  logic [AW-1:0] addr;
  logic we;
  logic [2**AW-1:0] word_sel;
  int checks = 0, failures = 0;

  cam_addr_decoder #(.AW(AW)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2**AW; a++)
      for (int w = 0; w < 2; w++) begin
        addr = AW'(a); we = 1'(w); #1; checks++;
        if (word_sel !== (w ? (2**AW)'(1) << a : '0)) begin
          failures++; $display("addr=%0d we=%0d sel=%h", a, w, word_sel);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
