// sign_match_filter: sign-bit matched filter of the received sample stream
// against one known time-domain preamble sequence.
//
// Only the sign bits of the received I and Q samples enter an L-stage delay
// line. Every tap compares them with the stored sign bits of one coefficient
// C_k (the preamble, already compensated for one integer CFO candidate), so a
// tap needs no multiplier: each +-1 x +-1 product is an XNOR. A population
// count (an adder/CSA tree in hardware) sums the agreements, and the complex
// correlation  sum_k r(n-L+1+k) * conj(C_k)  follows as 2*agreements - 2L
// for the real and for the imaginary part. metric = |re| + |im| is the
// magnitude estimate used for peak search.
//
// Interface: one sample per in_valid; sgn_* = 1 means negative. coef_i[k],
// coef_q[k] are the sign bits of C_k, k = 0 the first preamble sample.
// Outputs are registered: the correlation of the window that ends with the
// sample presented at in_valid appears on the next clock with out_valid.
//
// The sign-bit delay line, per-tap comparison and adder tree follow the
// match filter block diagram, as does the matching length of 256 taps. The
// exact arithmetic (XNOR agreement counts, |re| + |im| metric) is this
// design's own choice.
module sign_match_filter #(
  parameter int unsigned L  = 256,                 // matching length
  parameter int unsigned CW = $clog2(2 * L) + 2    // correlation width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 sgn_i,
  input  logic                 sgn_q,
  input  logic [L-1:0]         coef_i,
  input  logic [L-1:0]         coef_q,
  output logic                 out_valid,
  output logic signed [CW-1:0] corr_re,
  output logic signed [CW-1:0] corr_im,
  output logic [CW-1:0]        metric
);
  logic [L-1:0] win_i, win_q;     // win[L-1] newest, win[0] oldest

  // window including the incoming sample
  logic [L-1:0] nxt_i, nxt_q;
  assign nxt_i = {sgn_i, win_i[L-1:1]};
  assign nxt_q = {sgn_q, win_q[L-1:1]};

  logic [L-1:0] agr_ii, agr_qq, agr_qi, dis_iq;
  assign agr_ii = ~(nxt_i ^ coef_i);   // ri * ci = +1
  assign agr_qq = ~(nxt_q ^ coef_q);   // rq * cq = +1
  assign agr_qi = ~(nxt_q ^ coef_i);   // rq * ci = +1
  assign dis_iq =  (nxt_i ^ coef_q);   // -ri * cq = +1

  // adder tree (population counts)
  logic [CW-1:0] cnt_re, cnt_im;
  always_comb begin
    cnt_re = '0;
    cnt_im = '0;
    for (int k = 0; k < int'(L); k++) begin
      cnt_re = cnt_re + CW'(agr_ii[k]) + CW'(agr_qq[k]);
      cnt_im = cnt_im + CW'(agr_qi[k]) + CW'(dis_iq[k]);
    end
  end

  logic signed [CW-1:0] re_n, im_n;
  assign re_n = $signed(cnt_re << 1) - $signed(CW'(2 * L));
  assign im_n = $signed(cnt_im << 1) - $signed(CW'(2 * L));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      win_i     <= '0;
      win_q     <= '0;
      out_valid <= 1'b0;
      corr_re   <= '0;
      corr_im   <= '0;
      metric    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        win_i   <= nxt_i;
        win_q   <= nxt_q;
        corr_re <= re_n;
        corr_im <= im_n;
        metric  <= CW'(re_n < 0 ? -re_n : re_n) + CW'(im_n < 0 ? -im_n : im_n);
      end
    end
  end
endmodule
