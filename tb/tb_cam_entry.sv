// tb_cam_entry: writes random 256-bit patterns into one CAM entry, some with
// don't-care nibbles, and checks the registered match one clock after the
// key: exact key, key with one bit flipped in each word in turn, don't-care nibbles changed, and
// search disabled.
module tb_cam_entry;
  localparam int WORDS = 32;
  logic clk = 0, rst = 1, we = 0, match_en = 0, match;
  logic [2*WORDS-1:0] wbits = '0;
  logic [8*WORDS-1:0] key = '0;
  int checks = 0, failures = 0;

  cam_entry #(.WORDS(WORDS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [8*WORDS-1:0] pat;
  logic [2*WORDS-1:0] care;

  task automatic load();
    for (int c = 15; c >= 0; c--) begin
      @(negedge clk); we = 1;
      for (int i = 0; i < 2*WORDS; i++) wbits[i] = !care[i] || (pat[4*i +: 4] == 4'(c));
    end
    @(negedge clk); we = 0;
  endtask

  task automatic search(input logic [8*WORDS-1:0] k, input logic en, input logic exp);
    @(negedge clk); key = k; match_en = en;
    @(negedge clk); match_en = 0; checks++;
    if (match !== exp) begin failures++; $display("key=%h en=%b match=%b exp=%b", k, en, match, exp); end
  endtask

  initial begin
    logic [8*WORDS-1:0] k;
    repeat (2) @(negedge clk);
    rst = 0;
    pat = '0; care = '1;
    search('0, 1, 0);   // reset: nothing stored, nothing matches
    for (int t = 0; t < 20; t++) begin
      for (int i = 0; i < WORDS; i++) pat[8*i +: 8] = 8'($urandom);
      care = (t % 2) ? {24'h0, 40'hFF_FFFF_FFFF} : '1;
      load();
      search(pat, 1, 1);
      search(pat, 0, 0);
      for (int j = 0; j < WORDS; j++) begin
        automatic int b = 8*j + $urandom_range(7);      // one flipped bit in every word
        k = pat; k[b] = !k[b];
        search(k, 1, !care[b/4]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
