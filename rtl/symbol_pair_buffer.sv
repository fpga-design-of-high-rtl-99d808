// symbol_pair_buffer: data symbol memory that lines up the two OFDM symbols
// of an STBC pair subcarrier by subcarrier.
//
// Alamouti decoding needs y1[k] and y2[k] of two consecutive symbols at the
// same time. The first symbol of a pair is written into an N-entry bank; as
// the second symbol streams in, each subcarrier is read back and both values
// leave together. Pairing alternates automatically at every eop; pair_clr
// makes the next symbol the first of a pair.
//
// Interface: in_valid/bin/x/eop (the FFT output stream); out_valid with bin,
// y1 (first symbol) and y2 (second symbol) one clock after each subcarrier of
// the second symbol.
//
// The receiver keeps received symbols in memory banks whose access pattern
// repeats every six time slots; this block provides only the pairing
// function with a single bank, a simplification of that scheme.
module symbol_pair_buffer
  import stbc_pkg::*;
#(
  parameter int unsigned N = FFT_N
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [$clog2(N)-1:0] bin,
  input  cplx_t                x,
  input  logic                 eop,
  input  logic                 pair_clr,
  output logic                 out_valid,
  output logic [$clog2(N)-1:0] out_bin,
  output cplx_t                y1,
  output cplx_t                y2
);
  cplx_t bank [N];
  logic  second;               // current symbol is the second of a pair

  always_ff @(posedge clk) begin
    if (in_valid && !second) bank[bin] <= x;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      second    <= 1'b0;
      out_valid <= 1'b0;
      out_bin   <= '0;
      y1        <= '0;
      y2        <= '0;
    end else begin
      out_valid <= in_valid && second;
      if (in_valid) begin
        out_bin <= bin;
        y1      <= bank[bin];
        y2      <= x;
        if (eop) second <= ~second;
      end
      if (pair_clr) second <= 1'b0;
    end
  end
endmodule
