// symbol_boundary_detector: symbol boundary detection and coarse (integer)
// CFO estimation with a bank of sign-bit match filters.
//
// NUM_ICFO match filters run side by side on the same sign-bit sample
// stream, each loaded with the preamble compensated for one integer CFO
// candidate (candidate m stands for an ICFO of m - (NUM_ICFO-1)/2
// subcarriers). After a start pulse the monitor circuit watches WIN filter
// outputs: it keeps the largest metric seen so far, the sample index at which
// it occurred and the candidate that produced it. When the window is over,
// done pulses for one cycle with
//   boundary    index (0 = first sample after start) of the sample that
//               completes the best match, i.e. the last of the L matched
//               preamble samples;
//   icfo        the winning candidate as a signed subcarrier offset;
//   peak_metric its metric.
// Ties keep the earlier sample and the lower candidate.
//
// Detecting the boundary and the ICFO together with ICFO-compensated match
// filter coefficients follows the described receiver; the window length
// (one OFDM symbol with CP) and the argmax monitor are this design's own.
// Seven candidates cover +-3 subcarriers: 14 ppm of 2.5 GHz is 35 kHz, about
// 3.2 subcarrier spacings of 10.9 kHz.
module symbol_boundary_detector #(
  parameter int unsigned L        = 256,
  parameter int unsigned NUM_ICFO = 7,
  parameter int unsigned WIN      = 1152,
  parameter int unsigned CW       = $clog2(2 * L) + 2,
  parameter int unsigned IW       = $clog2(WIN)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic                sgn_i,
  input  logic                sgn_q,
  input  logic [L-1:0]        coef_i [NUM_ICFO],
  input  logic [L-1:0]        coef_q [NUM_ICFO],
  input  logic                start,
  output logic                busy,
  output logic                done,
  output logic [IW-1:0]       boundary,
  output logic signed [3:0]   icfo,
  output logic [CW-1:0]       peak_metric
);
  logic [NUM_ICFO-1:0] mf_valid;
  logic [CW-1:0]       mf_metric [NUM_ICFO];

  for (genvar m = 0; m < int'(NUM_ICFO); m++) begin : g_mf
    logic signed [CW-1:0] re_unused, im_unused;
    sign_match_filter #(.L(L), .CW(CW)) u_mf (
      .clk, .rst_n, .in_valid, .sgn_i, .sgn_q,
      .coef_i(coef_i[m]), .coef_q(coef_q[m]),
      .out_valid(mf_valid[m]), .corr_re(re_unused), .corr_im(im_unused),
      .metric(mf_metric[m]));
  end

  // best candidate of this sample
  logic [CW-1:0] best_m;
  logic [3:0]    best_c;
  always_comb begin
    best_m = mf_metric[0];
    best_c = '0;
    for (int m = 1; m < int'(NUM_ICFO); m++) begin
      if (mf_metric[m] > best_m) begin
        best_m = mf_metric[m];
        best_c = 4'(m);
      end
    end
  end

  // monitor circuit
  logic [IW-1:0] cnt;
  logic [3:0]    peak_c;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      done        <= 1'b0;
      cnt         <= '0;
      boundary    <= '0;
      peak_c      <= '0;
      peak_metric <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy        <= 1'b1;
        cnt         <= '0;
        peak_metric <= '0;
        boundary    <= '0;
        peak_c      <= '0;
      end else if (busy && mf_valid[0]) begin
        if (cnt == '0 || best_m > peak_metric) begin
          peak_metric <= best_m;
          boundary    <= cnt;
          peak_c      <= best_c;
        end
        if (cnt == IW'(WIN - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        cnt <= cnt + 1'b1;
      end
    end
  end

  assign icfo = $signed(peak_c - 4'((NUM_ICFO - 1) / 2));
endmodule
