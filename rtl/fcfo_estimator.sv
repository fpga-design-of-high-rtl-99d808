// fcfo_estimator: fractional carrier frequency offset estimation from the
// cyclic prefix of one OFDM symbol.
//
// The cyclic prefix repeats the last CP samples of the symbol, so with a
// frequency offset of eps subcarrier spacings
//   P = sum_{n=0}^{CP-1} r[n+N] * conj(r[n]) ~ |.|^2 * exp(j*2*pi*eps)
// and the angle of P is the phase drift over N samples. The block keeps the
// last N samples in a circular buffer (an N-entry RAM), multiplies every
// sample of the symbol's tail by the conjugate of the sample N earlier and
// accumulates CP products. A CORDIC vectoring unit then returns
//   angle = arg(P)             (full turn = 2**PHASE_W)
//   freq  = angle / N          (phase per sample, for the NCO)
// The estimate is unambiguous for |eps| < 0.5.
//
// Interface: start marks the first CP sample of a symbol (given together
// with its in_valid); after the symbol's N + CP samples, done pulses for
// one clock with angle and freq valid until the next done. Samples at the
// sample rate, any spacing.
//
// The receiver has an FCFO estimator feeding the NCO loop; the CP
// correlation method, the buffer and the CORDIC are this design's own
// choice.
module fcfo_estimator
  import stbc_pkg::*;
#(
  parameter int unsigned N  = FFT_N,
  parameter int unsigned CP = CP_LEN,
  parameter int unsigned AW = 2 * DW + 1 + $clog2(CP)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  cplx_t                     x,
  input  logic                      start,
  output logic                      done,
  output logic [PHASE_W-1:0]        angle,
  output logic signed [PHASE_W-1:0] freq
);
  localparam int unsigned LN = $clog2(N);
  localparam int unsigned CW = $clog2(N + CP + 1);

  cplx_t             buf_mem [N];
  logic [LN-1:0]     wptr;
  logic [CW-1:0]     cnt;
  logic              active;
  logic signed [AW-1:0] acc_re, acc_im;

  // sample N earlier (read before this sample overwrites it)
  cplx_t old;
  assign old = buf_mem[wptr];

  logic signed [2*DW:0] p_re, p_im;
  assign p_re = (2*DW+1)'(x.re) * (2*DW+1)'(old.re) + (2*DW+1)'(x.im) * (2*DW+1)'(old.im);
  assign p_im = (2*DW+1)'(x.im) * (2*DW+1)'(old.re) - (2*DW+1)'(x.re) * (2*DW+1)'(old.im);

  logic [CW-1:0] idx;          // index of the current sample in the symbol
  assign idx = start ? '0 : cnt;

  logic [PHASE_W-1:0] ang_n;
  cordic_vector #(.IW(AW)) u_vec (.x_re(acc_re), .x_im(acc_im), .angle(ang_n));

  logic fin;
  always_ff @(posedge clk) begin
    if (in_valid) begin
      buf_mem[wptr] <= x;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr   <= '0;
      cnt    <= '0;
      active <= 1'b0;
      acc_re <= '0;
      acc_im <= '0;
      fin    <= 1'b0;
      done   <= 1'b0;
      angle  <= '0;
      freq   <= '0;
    end else begin
      fin  <= 1'b0;
      done <= 1'b0;
      if (in_valid) begin
        wptr <= wptr + 1'b1;
        if (start || active) begin
          cnt <= idx + 1'b1;
          if (start) begin
            active <= 1'b1;
            acc_re <= '0;
            acc_im <= '0;
          end else if (idx >= CW'(N)) begin
            acc_re <= acc_re + AW'(p_re);
            acc_im <= acc_im + AW'(p_im);
          end
          if (idx == CW'(N + CP - 1)) begin
            active <= 1'b0;
            fin    <= 1'b1;
          end
        end
      end
      if (fin) begin
        done  <= 1'b1;
        angle <= ang_n;
        freq  <= $signed(ang_n) >>> LN;
      end
    end
  end
endmodule
