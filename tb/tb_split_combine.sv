// tb_split_combine: splits random packets, checks the PE side gets the
// payload with the header cleared one clock later, returns a modified payload
// after a random delay and checks the merged packet is the cached header with
// its time-to-live decremented (kept at 0 when already 0) followed by the PE's
// payload.
module tb_split_combine;
  import vnp_pkg::*;
  localparam int PKT_W = 256, HB = 20, HW = 8*HB;
  logic clk = 0, rst = 1, split = 0, pe_out_valid, pe_in_valid = 0, merged_valid;
  logic [PKT_W-1:0] pkt = '0, pe_out, pe_in = '0, merged;
  int checks = 0, failures = 0;

  split_combine #(.PKT_W(PKT_W), .HDR_BYTES(HB)) dut (.*);
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
    logic [PKT_W-1:0] p, proc_data, exp;
    logic [7:0] ttl;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 40; t++) begin
      p = {8{$urandom}};
      if (t % 5 == 0) p[8*TTL_BYTE +: 8] = 8'd0;
      ttl = p[8*TTL_BYTE +: 8];
      @(negedge clk); split = 1; pkt = p;
      @(negedge clk); split = 0; pkt = '0;
      chk(pe_out_valid, "pe_out_valid");
      chk(pe_out == {p[PKT_W-1:HW], {HW{1'b0}}}, "pe_out payload");
      @(negedge clk);
      chk(!pe_out_valid, "pe_out_valid one clock");
      repeat ($urandom_range(5)) @(negedge clk);
      proc_data = {8{$urandom}};
      pe_in = proc_data; pe_in_valid = 1;
      @(negedge clk); pe_in_valid = 0;
      exp = {proc_data[PKT_W-1:HW], p[HW-1:0]};
      exp[8*TTL_BYTE +: 8] = (ttl == 0) ? 8'd0 : ttl - 8'd1;
      chk(merged_valid, "merged_valid");
      chk(merged == exp, "merged packet");
      @(negedge clk);
      chk(!merged_valid, "merged_valid one clock");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
