// dichotomy_demapper: hard-decision QPSK / 16QAM demapper working on
// un-normalised STBC decoder outputs.
//
// The decoder delivers z = g*s with g = |h1|^2 + |h2|^2. Instead of dividing
// z by g, the decision thresholds are scaled by g. Each axis is decided in
// two dichotomy stages:
//   stage 1  the sign of the axis value (the half-plane);
//   stage 2  (16QAM only) whether |value| lies below the mid threshold
//            2/sqrt(10) * g, i.e. on an inner (+-1) or outer (+-3) level.
// 16QAM levels are +-1/sqrt(10), +-3/sqrt(10) (unit average power); the
// threshold constant 2/sqrt(10) is held in Q10 as THR_Q10 = 648.
//
// Output bits (Gray): 16QAM bits = {I sign, I inner, Q sign, Q inner},
// QPSK bits = {2'b00, I sign, Q sign}; a sign bit is 1 for a negative value,
// an inner bit is 1 for the +-1 level. Registered, one clock latency, one
// subcarrier per clock.
//
// Scaling the constellation by the STBC normalisation term to avoid
// division, in a two-stage dichotomy, follows the description; the bit
// labelling and the threshold format are this design's own choices.
module dichotomy_demapper
  import stbc_pkg::*;
#(
  parameter int unsigned ZW      = 2 * DW + 2,
  parameter int unsigned THR_Q10 = 648
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  mod_t                 mode,
  input  logic signed [ZW-1:0] z_re,
  input  logic signed [ZW-1:0] z_im,
  input  logic [ZW-1:0]        g,
  output logic                 out_valid,
  output logic [3:0]           bits
);
  localparam int unsigned CWD = ZW + 12;

  logic [ZW-1:0]  abs_re, abs_im;
  logic [CWD-1:0] thr, mag_re, mag_im;
  assign abs_re = z_re < 0 ? ZW'(-z_re) : ZW'(z_re);
  assign abs_im = z_im < 0 ? ZW'(-z_im) : ZW'(z_im);
  assign thr    = CWD'(g) * CWD'(THR_Q10);
  assign mag_re = CWD'(abs_re) << 10;
  assign mag_im = CWD'(abs_im) << 10;

  logic [3:0] b;
  always_comb begin
    if (mode == MOD_16QAM) b = {z_re < 0, mag_re < thr, z_im < 0, mag_im < thr};
    else                   b = {2'b00, z_re < 0, z_im < 0};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      bits      <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) bits <= b;
    end
  end
endmodule
