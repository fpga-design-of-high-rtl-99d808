// bit_follow_check (BFC): bit-follow (underflow) length for every candidate
// common-prefix length.
//
// After a common prefix of c bits, high has a 1 and low a 0 in the first
// differing position. The follow pattern is the run of positions just below
// it where high holds 0 and low holds 1 (high = ..1000.., low = ..0111..):
// those bits cannot be output yet and are counted instead. A single XOR-based
// gate level marks such positions (high ^ low, qualified by low being 1),
// and one LZD16 per candidate c, on the inverted and left-shifted marks,
// returns the run length. All 16 candidates are evaluated in parallel so a
// 16:1 multiplexer driven by the leading bit check can pick one; follow[c] is
// 0..15-c. Combinational.
//
// The XOR gate plus LZD structure follows the description; qualifying the
// XOR with low (so that a 1-over-0 position does not count) is this design's
// own choice, needed for the run to mean the usual underflow condition.
module bit_follow_check (
  input  logic [15:0] low,
  input  logic [15:0] high,
  output logic [3:0]  follow [16]
);
  logic [15:0] mark;
  assign mark = (high ^ low) & low;      // high = 0, low = 1

  for (genvar c = 0; c < 16; c++) begin : g_cand
    logic [15:0] run;    // marks below the first differing bit, left aligned
    logic [15:0] inv;
    logic [3:0]  lz;
    logic        nz;
    assign run = mark << (c + 1);
    // a zero shifted in from the right ends the run at bit 0 at the latest
    assign inv = ~run;
    lzd16 u_lzd (.x(inv), .pos(lz), .valid(nz));
    always_comb follow[c] = (lz > 4'(15 - c)) ? 4'(15 - c) : lz;
  end
endmodule
