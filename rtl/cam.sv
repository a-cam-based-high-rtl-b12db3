// cam: content addressable memory of DEPTH patterns, WIDTH bits each.
//
// Every entry is a chain of single word comparators built on 4-bit LUTs
// (cam_entry). A search applies `cam_data` as the key to all entries at once
// with `cam_match_en` high; each entry registers its match into the match bus
// and the encoder registers the matching address and the Match Hit, so
// `cam_wordaddr_out` and `cam_match` answer a search two clocks after it is
// applied, and a new search can start every clock.
// A write (`cam_write_en` with `cam_wordaddr_in` and `cam_data` as pattern)
// stores the pattern's first `cam_hdr_bytes` bytes; the bytes behind them are
// don't-care, so the control plane sets the header length per pattern. It
// takes 16 clocks while `cam_write_rdy` is low; searches during a write may
// see the entry being written half-loaded, so users wait for `cam_write_rdy`.
// The structure (LUT comparators, counter, address decoder, match bus,
// encoder) and port names follow the document's prototype; the 2-clock
// search latency comes from its two register stages.
module cam #(
  parameter int WIDTH = 256,
  parameter int DEPTH = 32,
  parameter int AW    = 5,
  parameter int BW    = $clog2(WIDTH/8 + 1)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             cam_write_en,
  input  logic [AW-1:0]    cam_wordaddr_in,
  input  logic [WIDTH-1:0] cam_data,
  input  logic [BW-1:0]    cam_hdr_bytes,
  input  logic             cam_match_en,
  output logic [AW-1:0]    cam_wordaddr_out,
  output logic             cam_match,
  output logic             cam_write_rdy
);
  localparam int WORDS = WIDTH / 8;
  localparam int CW    = BW + 1;

  logic [AW-1:0]      waddr;
  logic [WIDTH-1:0]   wpattern;
  logic [CW-1:0]      care;
  logic [3:0]         cnt;
  logic               we;
  logic [DEPTH-1:0]   word_sel;
  logic [WIDTH/4-1:0] wbits;
  logic [DEPTH-1:0]   match_bus;

  cam_write_counter #(.WIDTH(WIDTH), .AW(AW), .CW(CW)) u_cnt (
    .clk, .rst, .write_en(cam_write_en), .addr_in(cam_wordaddr_in),
    .pattern_in(cam_data), .care_in({cam_hdr_bytes, 1'b0}), .addr(waddr),
    .pattern(wpattern), .care, .cnt, .we,
    .write_rdy(cam_write_rdy)
  );

  cam_addr_decoder #(.AW(AW)) u_dec (.addr(waddr), .we, .word_sel);

  cam_write_data #(.WIDTH(WIDTH), .CW(CW)) u_wdata (
    .pattern(wpattern), .care, .cnt, .data(wbits)
  );

  for (genvar e = 0; e < DEPTH; e++) begin : g_entry
    cam_entry #(.WORDS(WORDS)) u_entry (
      .clk, .rst, .we(word_sel[e]), .wbits, .key(cam_data),
      .match_en(cam_match_en), .match(match_bus[e])
    );
  end

  cam_match_encoder #(.DEPTH(DEPTH), .AW(AW)) u_enc (
    .clk, .rst, .match_bus, .addr(cam_wordaddr_out), .match(cam_match)
  );
endmodule
