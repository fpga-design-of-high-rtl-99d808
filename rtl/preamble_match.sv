// preamble_match: preliminary channel frequency response from the received
// preamble subcarriers, without a multiplier.
//
// The preamble subcarriers are BPSK with a constant boosted amplitude A, so
// H_k = Y_k * P_k / |P_k|^2 = +-Y_k / A. Only the sign bit of each preamble
// pattern is stored; it steers an add/subtract multiplexer, and 1/A is a
// constant in canonic signed digit form, applied as a short sum of shifted
// copies of Y_k:
//   1/A ~ 2^-2 - 2^-4 - 2^-6 + 2^-8 + 2^-10 = 0.17676
// which matches 1/(4*sqrt(2)) = 0.17678, the inverse of the 802.16e preamble
// boosting amplitude 4*sqrt(2) (data subcarriers at unit amplitude).
//
// Interface: y with in_valid and the subcarrier's preamble sign psign
// (1 = negative); h with out_valid one clock later, rounded to DW bits.
//
// The sign-controlled add/subtract structure with a CSD constant follows the
// description of the initialization stage; the constant's value is derived
// from the 802.16e boosting and the rounding is this design's own choice.
module preamble_match
  import stbc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t y,
  input  logic  psign,
  output logic  out_valid,
  output cplx_t h
);
  localparam int FB = 10;                    // fraction bits of the CSD sum
  localparam int AW = DW + FB + 2;

  // CSD constant: 2^-2 - 2^-4 - 2^-6 + 2^-8 + 2^-10
  function automatic logic signed [AW-1:0] csd_scale(input logic signed [DW-1:0] v);
    logic signed [AW-1:0] x;
    x = AW'(v);
    return (x <<< (FB - 2)) - (x <<< (FB - 4)) - (x <<< (FB - 6))
         + (x <<< (FB - 8)) + (x <<< (FB - 10));
  endfunction

  function automatic logic signed [DW-1:0] round_out(input logic signed [AW-1:0] a);
    logic signed [AW-1:0] r;
    r = (a + AW'(1 <<< (FB - 1))) >>> FB;
    return r[DW-1:0];
  endfunction

  logic signed [AW-1:0] sre, sim;
  always_comb begin
    sre = csd_scale(y.re);
    sim = csd_scale(y.im);
    if (psign) begin
      sre = -sre;
      sim = -sim;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      h         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        h.re <= round_out(sre);
        h.im <= round_out(sim);
      end
    end
  end
endmodule
