// stbc_decoder: Alamouti space-time block decoder for two transmit antennas
// and one receive antenna, one subcarrier per clock.
//
// For a subcarrier with channel responses h1, h2 (antenna 1 and 2) and the
// two received values y1, y2 of an STBC symbol pair
//   y1 = h1*s1 + h2*s2,   y2 = -h1*conj(s2) + h2*conj(s1)
// the combiner forms
//   z1 = conj(h1)*y1 + h2*conj(y2) = g*s1
//   z2 = conj(h2)*y1 - h1*conj(y2) = g*s2,   g = |h1|^2 + |h2|^2
// and passes g along instead of dividing by it: the demapper scales its
// decision thresholds by g. All products are kept at full precision.
//
// Interface: in_valid with y1, y2, h1, h2 (16-bit complex); out_valid,
// z1, z2 (OW-bit complex) and g one clock later; one subcarrier per cycle.
//
// Combining with division avoided follows the description of the tracking
// stage; the Alamouti transmit order and the single register stage are this
// design's own choices.
module stbc_decoder
  import stbc_pkg::*;
#(
  parameter int unsigned OW = 2 * DW + 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  cplx_t                y1,
  input  cplx_t                y2,
  input  cplx_t                h1,
  input  cplx_t                h2,
  output logic                 out_valid,
  output logic signed [OW-1:0] z1_re,
  output logic signed [OW-1:0] z1_im,
  output logic signed [OW-1:0] z2_re,
  output logic signed [OW-1:0] z2_im,
  output logic [OW-1:0]        g
);
  function automatic logic signed [OW-1:0] mul(input logic signed [DW-1:0] a,
                                               input logic signed [DW-1:0] b);
    return OW'(a) * OW'(b);
  endfunction

  logic signed [OW-1:0] n1re, n1im, n2re, n2im, ng;
  always_comb begin
    n1re = mul(h1.re, y1.re) + mul(h1.im, y1.im) + mul(h2.re, y2.re) + mul(h2.im, y2.im);
    n1im = mul(h1.re, y1.im) - mul(h1.im, y1.re) + mul(h2.im, y2.re) - mul(h2.re, y2.im);
    n2re = mul(h2.re, y1.re) + mul(h2.im, y1.im) - mul(h1.re, y2.re) - mul(h1.im, y2.im);
    n2im = mul(h2.re, y1.im) - mul(h2.im, y1.re) - mul(h1.im, y2.re) + mul(h1.re, y2.im);
    ng   = mul(h1.re, h1.re) + mul(h1.im, h1.im) + mul(h2.re, h2.re) + mul(h2.im, h2.im);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      z1_re <= '0; z1_im <= '0; z2_re <= '0; z2_im <= '0; g <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        z1_re <= n1re; z1_im <= n1im;
        z2_re <= n2re; z2_im <= n2im;
        g     <= ng;
      end
    end
  end
endmodule
