// stbc_ofdm_top: STBC-OFDM downlink baseband receiver (two transmit
// antennas, one receive antenna) and, beside it, the orthogonal error
// detector.
//
// Receiver path, one clock domain, one sample every CLK_PER_SAMPLE clocks:
//   rx sign bits -> symbol boundary detector (ICFO-compensated match filters)
//   rx -> sample delay buffer -> NCO/derotator -> guard interval removal
//      -> FFT -> preamble match (preamble symbol)      -> cfr_* ports
//             -> symbol pair memory -> STBC decoder -> dichotomy demapper
//   derotator output -> FCFO estimator -> NCO frequency
// acq_start opens a search window of one symbol (N + CP samples). Its
// result gives the start of the preamble symbol (its first CP sample lies
// L-1+CP samples before the boundary, the coefficients being the first L
// useful preamble samples) and the integer CFO. The delay buffer holds DLY
// samples, so the preamble is still in the buffer when the search ends and
// the framing runs on the delayed stream. The NCO is loaded with the integer
// CFO when the boundary is found and its phase restarts on the first
// preamble sample; the FCFO estimate of the preamble symbol is added to its
// frequency for the data symbols. After the FFT, the preamble symbol goes
// through the preamble match, whose CFR leaves through the cfr_* ports for
// the channel estimator. The following DATA_SYMS_P symbols are paired for
// Alamouti decoding; the CSI (h1, h2 per subcarrier, in FFT output units)
// comes in through the csi_* write port into two N-entry memories, and
// decoded bits of both symbols of the pair leave through dem_* together
// with their subcarrier index, one subcarrier per clock.
// All N bins are decoded; picking the data subcarriers of a PUSC
// permutation is left to the consumer.
//
// The tracking parts of the two-stage channel estimator (LS estimator,
// Hessian calculator, path decorrelator, decorrelator) are not part of this
// RTL: their input (cfr_*) and output (csi_*) are ports. The partial sorting
// network of the significant-path search is included with its own ports
// (path_*), since the IFFT stage that would feed it belongs to that
// estimator.
//
// The orthogonal error detector has its own ports (oed_*), unrelated to the
// receiver.
//
// Parameters default to the described system: N = 1024, CP = 128, 40 data
// symbols, 256-tap match filters, 7 ICFO candidates (+-3 subcarriers, from
// the 14 ppm CFO target at 2.5 GHz), 7 clocks per sample. DLY = 2048 is this
// design's own choice (at least one window plus L plus CP).
module stbc_ofdm_top
  import stbc_pkg::*;
#(
  parameter int unsigned N         = FFT_N,
  parameter int unsigned CP        = CP_LEN,
  parameter int unsigned L         = 256,
  parameter int unsigned NUM_ICFO  = 7,
  parameter int unsigned DATA_SYMS_P = DATA_SYMS,
  parameter int unsigned DLY       = 2048,
  parameter int unsigned NSUB      = CP_LEN,
  parameter int unsigned NP        = 8,
  parameter int unsigned LN        = $clog2(N),
  parameter int unsigned WIN       = N + CP,
  parameter int unsigned CW        = $clog2(2 * L) + 2,
  parameter int unsigned ZW        = 2 * DW + 2
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // received samples
  input  logic                      rx_valid,
  input  cplx_t                     rx,
  // acquisition
  input  logic                      acq_start,
  input  logic [L-1:0]              mf_coef_i [NUM_ICFO],
  input  logic [L-1:0]              mf_coef_q [NUM_ICFO],
  input  logic [N-1:0]              pre_sign,
  input  mod_t                      mode,
  output logic                      sync_found,
  output logic signed [3:0]         icfo,
  output logic [CW-1:0]             sync_metric,
  output logic signed [PHASE_W-1:0] nco_freq,
  output logic                      fcfo_update,
  output logic                      frame_done,
  output logic                      fft_overflow,
  // preliminary CFR to the channel estimator
  output logic                      cfr_valid,
  output logic [LN-1:0]             cfr_k,
  output cplx_t                     cfr,
  // significant-path search on time-domain taps from the channel estimator
  input  logic                      path_start,
  input  logic                      path_valid,
  input  cplx_t                     path_tap,
  output logic                      path_done,
  output logic [$clog2(NSUB)-1:0]   path_idx [NP],
  output logic [NP-1:0]             path_ok,
  // CSI from the channel estimator
  input  logic                      csi_we,
  input  logic [LN-1:0]             csi_addr,
  input  cplx_t                     csi_h1,
  input  cplx_t                     csi_h2,
  // decoded data
  output logic                      dem_valid,
  output logic [LN-1:0]             dem_k,
  output logic [3:0]                dem_bits1,
  output logic [3:0]                dem_bits2,
  // orthogonal error detector
  input  logic                      oed_in_valid,
  input  logic [15:0]               oed_low,
  input  logic [15:0]               oed_high,
  output logic                      oed_out_valid,
  output logic [3:0]                oed_bit_count,
  output logic [15:0]               oed_bit_value,
  output logic [7:0]                oed_follow_emit,
  output logic [3:0]                oed_follow_count,
  output logic [15:0]               oed_low_update,
  output logic [15:0]               oed_high_update,
  output logic                      oed_degenerate
);
  localparam int unsigned DLW = $clog2(DLY);
  localparam int unsigned IW  = $clog2(WIN);

  // absolute count of received samples
  logic [31:0] ncnt;
  always_ff @(posedge clk)
    if (!rst_n) ncnt <= '0;
    else if (rx_valid) ncnt <= ncnt + 1'b1;

  // ------------------------------------------- boundary detection + ICFO
  logic          sbd_busy, sbd_done;
  logic [IW-1:0] sbd_boundary;
  logic signed [3:0] sbd_icfo;
  logic [CW-1:0] sbd_metric;
  symbol_boundary_detector #(.L(L), .NUM_ICFO(NUM_ICFO), .WIN(WIN), .CW(CW), .IW(IW)) u_sbd (
    .clk, .rst_n, .in_valid(rx_valid), .sgn_i(rx.re[DW-1]), .sgn_q(rx.im[DW-1]),
    .coef_i(mf_coef_i), .coef_q(mf_coef_q), .start(acq_start), .busy(sbd_busy),
    .done(sbd_done), .boundary(sbd_boundary), .icfo(sbd_icfo), .peak_metric(sbd_metric));

  logic [31:0] n0, s0;
  logic        locked;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      n0 <= '0; s0 <= '0; locked <= 1'b0; sync_found <= 1'b0;
      icfo <= '0; sync_metric <= '0;
    end else begin
      sync_found <= 1'b0;
      if (acq_start && !sbd_busy) begin
        n0     <= ncnt + (rx_valid ? 32'd1 : 32'd0);
        locked <= 1'b0;
      end
      if (sbd_done) begin
        s0          <= n0 + 32'(sbd_boundary) - 32'(L - 1) - 32'(CP);
        icfo        <= sbd_icfo;
        sync_metric <= sbd_metric;
        locked      <= 1'b1;
        sync_found  <= 1'b1;
      end
      if (frame_done) locked <= 1'b0;
    end
  end

  // ------------------------------------------------- sample delay buffer
  cplx_t          dbuf [DLY];
  logic [DLW-1:0] dwp;
  logic           dl_valid;
  cplx_t          dl;
  logic [31:0]    dl_n;          // absolute index of the delayed sample
  always_ff @(posedge clk) if (rx_valid) dbuf[dwp] <= rx;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dwp <= '0; dl_valid <= 1'b0; dl <= '0; dl_n <= '0;
    end else begin
      dl_valid <= rx_valid;
      if (rx_valid) begin
        dwp  <= dwp + 1'b1;
        dl   <= dbuf[dwp];
        dl_n <= ncnt - 32'(DLY);
      end
    end
  end

  // ---------------------------------------------------------------- NCO
  // The phase restarts on the first sample of the preamble symbol.
  logic  pre_start;
  assign pre_start = dl_valid && locked && dl_n == s0;

  logic  dr_valid;
  cplx_t dr;
  logic [31:0] dr_n;
  nco_derotator u_nco (.clk, .rst_n, .in_valid(dl_valid), .x(dl), .freq(nco_freq),
                       .phase_clr(pre_start), .out_valid(dr_valid), .y(dr));
  always_ff @(posedge clk) if (dl_valid) dr_n <= dl_n;

  logic sync;
  assign sync = dr_valid && locked && dr_n == s0;

  // --------------------------------------------------------------- FCFO
  logic                      fc_done;
  logic [PHASE_W-1:0]        fc_angle;
  logic signed [PHASE_W-1:0] fc_freq;
  fcfo_estimator #(.N(N), .CP(CP)) u_fcfo (.clk, .rst_n, .in_valid(dr_valid), .x(dr),
    .start(sync), .done(fc_done), .angle(fc_angle), .freq(fc_freq));

  // NCO frequency: the integer CFO when the boundary is found, then the
  // fractional estimate of the preamble symbol is added.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      nco_freq    <= '0;
      fcfo_update <= 1'b0;
    end else begin
      fcfo_update <= fc_done;
      if (sbd_done)     nco_freq <= PHASE_W'(sbd_icfo) <<< (PHASE_W - LN);
      else if (fc_done) nco_freq <= nco_freq + fc_freq;
    end
  end

  // ------------------------------------------------ GI removal and FFT
  logic          gi_valid, gi_sop, gi_eop;
  cplx_t         gi_y;
  logic [LN-1:0] gi_idx;
  logic [7:0]    gi_sym;
  guard_interval_removal #(.N(N), .CP(CP), .SW(8)) u_gi (.clk, .rst_n,
    .in_valid(dr_valid && locked), .x(dr), .sync, .out_valid(gi_valid), .y(gi_y),
    .idx(gi_idx), .sop(gi_sop), .eop(gi_eop), .sym_cnt(gi_sym));

  logic          ff_valid, ff_sop, ff_eop;
  logic [LN-1:0] ff_bin;
  cplx_t         ff_x;
  fft_radix2 #(.N(N)) u_fft (.clk, .rst_n,
    .in_valid(gi_valid && gi_sym <= 8'(DATA_SYMS_P)), .in_idx(gi_idx), .x(gi_y),
    .out_valid(ff_valid), .bin(ff_bin), .xf(ff_x), .out_sop(ff_sop), .out_eop(ff_eop),
    .overflow(fft_overflow));

  // symbols out of the FFT since sync: 0 is the preamble
  logic [7:0] osym;
  always_ff @(posedge clk) begin
    if (!rst_n || sync) osym <= '0;
    else if (ff_valid && ff_eop) osym <= osym + 1'b1;
  end
  assign frame_done = ff_valid && ff_eop && osym == 8'(DATA_SYMS_P);

  // subcarrier index (the NCO has already removed the integer CFO)
  logic [LN-1:0] k_cur;
  assign k_cur = ff_bin;

  // ------------------------------------------------------ preamble match
  preamble_match u_pm (.clk, .rst_n, .in_valid(ff_valid && osym == 0), .y(ff_x),
    .psign(pre_sign[k_cur]), .out_valid(cfr_valid), .h(cfr));
  always_ff @(posedge clk) if (ff_valid) cfr_k <= k_cur;

  // ---------------------------------------------- significant-path search
  cplx_t         path_val_unused [NP];
  logic [2*DW:0] path_pow_unused [NP];
  partial_sort_topk #(.NSUB(NSUB), .NP(NP)) u_sort (.clk, .rst_n, .start(path_start),
    .in_valid(path_valid), .h(path_tap), .done(path_done), .path_idx(path_idx),
    .path_val(path_val_unused), .path_pow(path_pow_unused), .path_ok(path_ok));

  // ------------------------------------------------------- CSI memories
  cplx_t csi1 [N], csi2 [N];
  always_ff @(posedge clk) begin
    if (csi_we) begin
      csi1[csi_addr] <= csi_h1;
      csi2[csi_addr] <= csi_h2;
    end
  end

  // ------------------------------------------- pairing, STBC, demapping
  logic          pb_valid;
  logic [LN-1:0] pb_k;
  cplx_t         pb_y1, pb_y2;
  symbol_pair_buffer #(.N(N)) u_pair (.clk, .rst_n, .in_valid(ff_valid && osym != 0),
    .bin(k_cur), .x(ff_x), .eop(ff_eop), .pair_clr(sync), .out_valid(pb_valid),
    .out_bin(pb_k), .y1(pb_y1), .y2(pb_y2));

  logic                 sd_valid;
  logic signed [ZW-1:0] z1_re, z1_im, z2_re, z2_im;
  logic [ZW-1:0]        sd_g;
  stbc_decoder #(.OW(ZW)) u_stbc (.clk, .rst_n, .in_valid(pb_valid), .y1(pb_y1), .y2(pb_y2),
    .h1(csi1[pb_k]), .h2(csi2[pb_k]), .out_valid(sd_valid), .z1_re, .z1_im, .z2_re, .z2_im,
    .g(sd_g));

  // one demapper per symbol of the pair
  logic [LN-1:0] sd_k;
  logic          dem_valid2;
  always_ff @(posedge clk) if (pb_valid) sd_k <= pb_k;

  dichotomy_demapper #(.ZW(ZW)) u_dem1 (.clk, .rst_n, .in_valid(sd_valid), .mode,
    .z_re(z1_re), .z_im(z1_im), .g(sd_g), .out_valid(dem_valid), .bits(dem_bits1));
  dichotomy_demapper #(.ZW(ZW)) u_dem2 (.clk, .rst_n, .in_valid(sd_valid), .mode,
    .z_re(z2_re), .z_im(z2_im), .g(sd_g), .out_valid(dem_valid2), .bits(dem_bits2));

  always_ff @(posedge clk) if (sd_valid) dem_k <= sd_k;

  // ------------------------------------------ orthogonal error detector
  orthogonal_error_detector #(.PEND_W(8)) u_oed (.clk, .rst_n, .in_valid(oed_in_valid),
    .low(oed_low), .high(oed_high), .out_valid(oed_out_valid), .bit_count(oed_bit_count),
    .bit_value(oed_bit_value), .follow_emit(oed_follow_emit), .follow_count(oed_follow_count),
    .low_update(oed_low_update), .high_update(oed_high_update), .degenerate(oed_degenerate));
endmodule
