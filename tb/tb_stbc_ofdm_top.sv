// tb_stbc_ofdm_top: end-to-end run of the receiver at its default size: one
// downlink sub-frame (preamble + 40 data symbols = 20 Alamouti pairs) from
// two transmit antennas over a flat channel, with a carrier frequency offset
// of 1.06 subcarrier spacings (integer part +1, fractional 0.06).
//
// The stimulus is built in floating point: frequency-domain symbols, an
// inverse DFT, cyclic prefix, the two antennas' channel gains, the CFO
// rotation and a little noise, quantised to 16 bits and sent one sample per
// 7 clocks after 300 noise samples. The preamble uses every third
// subcarrier with BPSK at amplitude 4*sqrt(2) and is sent from antenna 1;
// the match filter coefficients are the sign bits of its first 256 useful
// samples, rotated for each ICFO candidate -3..+3.
// The CSI ports receive the true channel in FFT output units, including the
// constant phase the CFO leaves after correction; the expected decisions
// are the transmitted symbols. Pairs 0-9 use QPSK, pairs 10-19 16QAM (the
// mode is switched between pairs).
//
// Checked: ICFO = +1, the NCO frequency after FCFO update (1.06 subcarriers
// per N samples), the preamble CFR magnitude, every decoded bit of every
// subcarrier of every pair, frame_done, no FFT overflow; on the side the
// orthogonal error detector and the path sorter. Each mechanism (sync,
// FCFO update, CFR, pair decode in both modes, mode switch, OED follow and
// degenerate cases, path search, frame end) must occur at least once.
module tb_stbc_ofdm_top;
  import stbc_pkg::*;
  localparam int N = 1024, CP = 128, L = 256, NI = 7, LEAD = 300, NPAIR = 20;
  localparam real PI = 3.14159265358979;
  localparam real SC = 1600.0 / 32.0;           // FFT output units per unit symbol
  localparam real A_PRE = 4.0 * 1.41421356237;
  localparam real EPS_TOT = 1.06;

  logic clk = 0, rst_n = 0;
  logic rx_valid = 0, acq_start = 0;
  cplx_t rx = '0;
  logic [L-1:0] mf_coef_i [NI], mf_coef_q [NI];
  logic [N-1:0] pre_sign;
  mod_t mode = MOD_QPSK;
  logic sync_found, fcfo_update, frame_done, fft_overflow;
  logic signed [3:0] icfo;
  logic [10:0] sync_metric;
  logic signed [PHASE_W-1:0] nco_freq;
  logic cfr_valid;
  logic [9:0] cfr_k;
  cplx_t cfr;
  logic path_start = 0, path_valid = 0, path_done;
  cplx_t path_tap = '0;
  logic [6:0] path_idx [8];
  logic [7:0] path_ok;
  logic csi_we = 0;
  logic [9:0] csi_addr = '0;
  cplx_t csi_h1 = '0, csi_h2 = '0;
  logic dem_valid;
  logic [9:0] dem_k;
  logic [3:0] dem_bits1, dem_bits2;
  logic oed_in_valid = 0;
  logic [15:0] oed_low = 0, oed_high = 0;
  logic oed_out_valid, oed_degenerate;
  logic [3:0] oed_bit_count, oed_follow_count;
  logic [15:0] oed_bit_value, oed_low_update, oed_high_update;
  logic [7:0] oed_follow_emit;

  stbc_ofdm_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_sync = 0, n_fcfo = 0, n_cfr = 0, n_dem_q = 0, n_dem_16 = 0, n_switch = 0;
  int n_oed_follow = 0, n_oed_degen = 0, n_path = 0, n_frame = 0, bit_err = 0;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real cosT [N], sinT [N];
  real h1r, h1i, h2r, h2i;
  // transmitted frequency-domain symbols of each pair: s1, s2 per subcarrier
  real s1r [NPAIR][N], s1i [NPAIR][N], s2r [NPAIR][N], s2i [NPAIR][N];
  bit  ps [N];
  real ptr [N], pti [N];          // time-domain preamble (useful part)

  // inverse DFT of (ar, ai) without 1/N, scaled by SC (the FFT output is X/N)
  task automatic idft(input real ar [N], input real ai [N], output real tr [N], output real ti [N]);
    for (int n = 0; n < N; n++) begin
      real sr, si;
      sr = 0; si = 0;
      for (int k = 0; k < N; k++) begin
        if (ar[k] != 0.0 || ai[k] != 0.0) begin
          int m;
          m = (k * n) % N;
          sr += ar[k] * cosT[m] - ai[k] * sinT[m];
          si += ar[k] * sinT[m] + ai[k] * cosT[m];
        end
      end
      tr[n] = sr * SC;
      ti[n] = si * SC;
    end
  endtask

  longint nabs = 0;      // absolute index of the next sample sent

  task automatic send(input real vr, input real vi);
    real a, rr, ri;
    int nz1, nz2, qr, qi;
    a = 2.0 * PI * EPS_TOT * $itor(nabs) / N;
    rr = vr * $cos(a) - vi * $sin(a);
    ri = vr * $sin(a) + vi * $cos(a);
    nz1 = int'($urandom % 7) - 3;
    nz2 = int'($urandom % 7) - 3;
    qr = $rtoi(rr) + nz1;
    qi = $rtoi(ri) + nz2;
    @(negedge clk);
    rx_valid = 1; rx.re = 16'(qr); rx.im = 16'(qi);
    @(negedge clk);
    rx_valid = 0;
    repeat (5) @(negedge clk);
    nabs++;
  endtask

  // two antennas' time signals of one symbol through the flat channel
  task automatic send_symbol(input real a1r [N], input real a1i [N],
                             input real a2r [N], input real a2i [N]);
    real t1r [N], t1i [N], t2r [N], t2i [N], yr [N], yi [N];
    idft(a1r, a1i, t1r, t1i);
    idft(a2r, a2i, t2r, t2i);
    for (int n = 0; n < N; n++) begin
      yr[n] = h1r * t1r[n] - h1i * t1i[n] + h2r * t2r[n] - h2i * t2i[n];
      yi[n] = h1r * t1i[n] + h1i * t1r[n] + h2r * t2i[n] + h2i * t2r[n];
    end
    for (int n = N - CP; n < N; n++) send(yr[n], yi[n]);
    for (int n = 0; n < N; n++) send(yr[n], yi[n]);
  endtask

  function automatic real lvl(input mod_t md);
    int v;
    v = int'($urandom % 4);
    if (md == MOD_QPSK) return (v % 2 == 0 ? -1.0 : 1.0) / $sqrt(2.0);
    return $itor(2 * v - 3) / $sqrt(10.0);
  endfunction

  function automatic logic [3:0] bits_of(input mod_t md, input real re, input real im);
    if (md == MOD_QPSK) return {2'b00, re < 0.0, im < 0.0};
    return {re < 0.0, (re < 0.5 && re > -0.5), im < 0.0, (im < 0.5 && im > -0.5)};
  endfunction

  // ---------------------------------------------------------- stimulus
  initial begin
    real zr [N], zi [N], pr [N], pi_ [N];
    real a1r [N], a1i [N], a2r [N], a2i [N];
    real ph;
    for (int m = 0; m < N; m++) begin
      cosT[m] = $cos(2.0 * PI * m / N);
      sinT[m] = $sin(2.0 * PI * m / N);
    end
    h1r = 0.8 * $cos(0.5);  h1i = 0.8 * $sin(0.5);
    h2r = 0.6 * $cos(-1.2); h2i = 0.6 * $sin(-1.2);
    for (int k = 0; k < N; k++) begin
      ps[k] = $urandom;
      pre_sign[k] = ps[k];
      zr[k] = 0; zi[k] = 0;
      pr[k] = (k % 3 == 0) ? (ps[k] ? -A_PRE : A_PRE) : 0.0;
      pi_[k] = 0;
    end
    for (int p = 0; p < NPAIR; p++) begin
      mod_t md;
      md = (p < NPAIR / 2) ? MOD_QPSK : MOD_16QAM;
      for (int k = 0; k < N; k++) begin
        s1r[p][k] = lvl(md); s1i[p][k] = lvl(md);
        s2r[p][k] = lvl(md); s2i[p][k] = lvl(md);
      end
    end
    idft(pr, pi_, ptr, pti);
    // match filter coefficients: sign bits of the rotated preamble
    for (int m = 0; m < NI; m++)
      for (int j = 0; j < L; j++) begin
        real a, cr, ci;
        a = 2.0 * PI * (m - 3) * j / N;
        cr = ptr[j] * $cos(a) - pti[j] * $sin(a);
        ci = ptr[j] * $sin(a) + pti[j] * $cos(a);
        mf_coef_i[m][j] = cr < 0.0;
        mf_coef_q[m][j] = ci < 0.0;
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // CSI: channel in FFT output units with the phase left after correction
    ph = 2.0 * PI * (EPS_TOT * LEAD + (EPS_TOT - 1.0) * (N + CP)) / N;
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      csi_we = 1; csi_addr = 10'(k);
      csi_h1.re = 16'($rtoi(SC * (h1r * $cos(ph) - h1i * $sin(ph))));
      csi_h1.im = 16'($rtoi(SC * (h1r * $sin(ph) + h1i * $cos(ph))));
      csi_h2.re = 16'($rtoi(SC * (h2r * $cos(ph) - h2i * $sin(ph))));
      csi_h2.im = 16'($rtoi(SC * (h2r * $sin(ph) + h2i * $cos(ph))));
    end
    @(negedge clk);
    csi_we = 0;
    @(negedge clk); acq_start = 1;
    @(negedge clk); acq_start = 0;
    for (int n = 0; n < LEAD; n++) begin
      int r1, r2;
      r1 = int'($urandom % 601) - 300;
      r2 = int'($urandom % 601) - 300;
      send($itor(r1), $itor(r2));
    end
    send_symbol(pr, pi_, zr, zi);            // preamble from antenna 1
    for (int p = 0; p < NPAIR; p++) begin
      // first symbol: ant1 s1, ant2 s2; second: ant1 -conj(s2), ant2 conj(s1)
      send_symbol(s1r[p], s1i[p], s2r[p], s2i[p]);
      for (int k = 0; k < N; k++) begin
        a1r[k] = -s2r[p][k]; a1i[k] = s2i[p][k];
        a2r[k] = s1r[p][k];  a2i[k] = -s1i[p][k];
      end
      send_symbol(a1r, a1i, a2r, a2i);
    end
    // flush: the delay buffer (2048 samples), then the last FFT
    for (int n = 0; n < 3200; n++) send(0.0, 0.0);
    finish_checks();
  end

  // ------------------------------------------------ receiver checkers
  int dem_cnt = 0;
  always @(posedge clk) if (rst_n) begin
    if (fft_overflow) begin checks++; failures++; $display("FFT overflow"); end
    if (sync_found) begin
      n_sync++;
      checks++;
      if (icfo !== 4'sd1) begin failures++; $display("icfo %0d", icfo); end
    end
    if (fcfo_update) n_fcfo++;
    if (frame_done) n_frame++;
    if (cfr_valid && cfr_k % 3 == 0) begin
      real mag;
      mag = $sqrt($itor(cfr.re) * $itor(cfr.re) + $itor(cfr.im) * $itor(cfr.im));
      n_cfr++;
      checks++;
      if (mag < 0.8 * SC * 0.85 || mag > 0.8 * SC * 1.15) begin
        failures++;
        if (failures < 8) $display("cfr k=%0d magnitude %f", cfr_k, mag);
      end
    end
    if (dem_valid) begin
      int p;
      mod_t md;
      logic [3:0] e1, e2;
      p = dem_cnt / N;
      md = (p < NPAIR / 2) ? MOD_QPSK : MOD_16QAM;
      e1 = bits_of(md, s1r[p][dem_k], s1i[p][dem_k]);
      e2 = bits_of(md, s2r[p][dem_k], s2i[p][dem_k]);
      checks++;
      if (dem_bits1 !== e1 || dem_bits2 !== e2) begin
        failures++; bit_err++;
        if (bit_err < 8) $display("pair %0d k=%0d bits %b %b exp %b %b", p, dem_k, dem_bits1, dem_bits2, e1, e2);
      end
      if (md == MOD_QPSK) n_dem_q++; else n_dem_16++;
      dem_cnt++;
      // switch the mode after the last decision of pair NPAIR/2-1
      if (dem_cnt == NPAIR / 2 * N) begin
        mode <= MOD_16QAM;
        n_switch++;
      end
    end
  end

  // ------------------------------------ orthogonal error detector traffic
  initial begin
    @(posedge rst_n);
    for (int n = 0; n < 300; n++) begin
      logic [15:0] l, h;
      l = 16'($urandom); h = 16'($urandom);
      if (h < l) begin oed_low = h; h = l; l = oed_low; end
      if (n % 4 == 1) begin h = 16'h8123; l = 16'h7f00; end     // 1 follow run
      if (n % 50 == 7) h = l;
      @(negedge clk);
      oed_in_valid = 1; oed_low = l; oed_high = h;
      @(negedge clk);
      oed_in_valid = 0;
      checks++;
      if (!oed_out_valid) failures++;
      if (n % 4 == 1 && n % 50 != 7) begin
        // 1000 0001 .. / 0111 1111 ..: no common bit, 6 follow bits
        checks++;
        if (oed_bit_count !== 0 || oed_follow_count !== 4'd6 ||
            oed_low_update !== 16'h4000 || oed_high_update !== 16'hc8ff) begin
          failures++;
          $display("oed: count %0d follow %0d low %h high %h", oed_bit_count, oed_follow_count,
                   oed_low_update, oed_high_update);
        end
      end
      if (oed_follow_count != 0) n_oed_follow++;
      if (oed_degenerate) n_oed_degen++;
    end
  end

  // ------------------------------------------------ path search traffic
  initial begin
    @(posedge rst_n);
    repeat (10) @(negedge clk);
    path_start = 1;
    @(negedge clk);
    path_start = 0;
    for (int k = 0; k < 128; k++) begin
      @(negedge clk);
      path_valid = 1;
      path_tap.re = 16'(k == 9 ? 5000 : k == 40 ? -7000 : k == 77 ? 3000 : (k % 5) * 10);
      path_tap.im = 16'(k == 40 ? 100 : 0);
    end
    @(negedge clk);
    path_valid = 0;
    checks++;
    if (!path_done || path_idx[0] !== 7'd40 || path_idx[1] !== 7'd9 || path_idx[2] !== 7'd77 || path_ok != 8'hff)
      failures++;
    else n_path++;
  end

  task automatic finish_checks();
    repeat (20) @(negedge clk);
    checks++;
    // 1.06 subcarriers per N samples in phase-word units
    if (nco_freq < 24'sd17360 || nco_freq > 24'sd17374) begin
      failures++;
      $display("nco_freq %0d", nco_freq);
    end
    checks++;
    if (dem_cnt != NPAIR * N) begin failures++; $display("decisions %0d", dem_cnt); end
    $display("sync %0d fcfo %0d cfr %0d qpsk %0d 16qam %0d switch %0d oed_follow %0d oed_degen %0d path %0d frame %0d bit errors %0d",
             n_sync, n_fcfo, n_cfr, n_dem_q, n_dem_16, n_switch, n_oed_follow, n_oed_degen, n_path, n_frame, bit_err);
    if (n_sync == 0) failures++;
    if (n_fcfo == 0) failures++;
    if (n_cfr == 0) failures++;
    if (n_dem_q == 0) failures++;
    if (n_dem_16 == 0) failures++;
    if (n_switch == 0) failures++;
    if (n_oed_follow == 0) failures++;
    if (n_oed_degen == 0) failures++;
    if (n_path == 0) failures++;
    if (n_frame == 0) failures++;
    checks += 10;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
endmodule
