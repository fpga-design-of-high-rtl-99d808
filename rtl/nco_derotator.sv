// nco_derotator: numerically controlled oscillator and derotator that removes
// a carrier frequency offset from the received sample stream.
//
// A phase accumulator advances by freq (phase per sample, a full turn is
// 2**PHASE_W) for every accepted sample; the sample is rotated by minus the
// accumulated phase with a CORDIC rotator: y[n] = x[n] * exp(-j*phi[n]),
// phi[n] = n*freq. phase_clr restarts the accumulator: the sample accepted
// with phase_clr is rotated by zero and the next one by freq.
//
// Interface: in_valid/x in, out_valid/y one clock later. The NCO and
// derotator placement at the receiver input follows the receiver
// architecture; the CORDIC implementation and phase width are this design's
// own choices.
module nco_derotator
  import stbc_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  cplx_t                     x,
  input  logic signed [PHASE_W-1:0] freq,
  input  logic                      phase_clr,
  output logic                      out_valid,
  output cplx_t                     y
);
  logic [PHASE_W-1:0] phi, phi_use;
  cplx_t rot;
  assign phi_use = phase_clr ? '0 : phi;
  cordic_rotate u_rot (.x(x), .phase(-phi_use), .y(rot));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phi       <= '0;
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)       phi <= phi_use + PHASE_W'(freq);
      else if (phase_clr) phi <= '0;
      if (in_valid) y <= rot;
    end
  end
endmodule
