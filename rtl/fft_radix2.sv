// fft_radix2: memory-based N-point FFT (radix-2, decimation in time) with a
// ping-pong input buffer, for OFDM demodulation.
//
// Two N-entry banks alternate: while the samples of one symbol are written
// into one bank (in bit-reversed address order), the other bank is
// transformed in place and read out. One butterfly per clock:
//   a' = (a + W*b) / 2,  b' = (a - W*b) / 2,  W = exp(-j*2*pi*k/N)
// where the twiddle multiplication is a CORDIC rotation, so no twiddle ROM
// and no multiplier are needed. Every stage halves its results, so the
// output is X[k] / N, which cannot overflow. log2(N) stages of N/2
// butterflies take N/2*log2(N) clocks (5120 for N = 1024), after which the N
// bins are streamed out in natural order, one per clock. With 7 clocks per
// sample a symbol of N + CP samples lasts 8064 clocks, more than the
// 5120 + 1024 clocks needed, so the FFT keeps up with the sample stream.
//
// Interface: in_valid with in_idx (0 .. N-1) and x; writing index N-1
// completes a symbol and hands its bank to the transform. out_valid with
// bin, X, out_sop (bin 0) and out_eop (bin N-1). overflow pulses if a
// symbol completes while both banks are still busy (the symbol is dropped).
//
// The 1024-point FFT and its role follow the receiver; the architecture
// (in-place radix-2, CORDIC twiddles, ping-pong banks, per-stage scaling) is
// this design's own choice.
module fft_radix2
  import stbc_pkg::*;
#(
  parameter int unsigned N = FFT_N
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [$clog2(N)-1:0] in_idx,
  input  cplx_t                x,
  output logic                 out_valid,
  output logic [$clog2(N)-1:0] bin,
  output cplx_t                xf,
  output logic                 out_sop,
  output logic                 out_eop,
  output logic                 overflow
);
  localparam int unsigned LN = $clog2(N);

  typedef enum logic [1:0] {IDLE, CALC, DUMP} fft_state_t;

  cplx_t mem [2][N];

  fft_state_t     state;
  logic           wbank;       // bank being loaded
  logic           cbank;       // bank being transformed
  logic           pend;        // a loaded bank waits for the transform
  logic [LN-1:0]  stage;
  logic [LN-2:0]  bfly;
  logic [LN-1:0]  rd;

  function automatic logic [LN-1:0] bitrev(input logic [LN-1:0] v);
    for (int i = 0; i < int'(LN); i++) bitrev[i] = v[LN-1-i];
  endfunction

  // butterfly addressing
  logic [LN-1:0] half, pos, a_idx, b_idx, tw_k;
  always_comb begin
    half  = LN'(1) << stage;
    pos   = LN'(bfly) & (half - 1'b1);
    a_idx = ((LN'(bfly) >> stage) << (stage + 1)) | pos;
    b_idx = a_idx | half;
    tw_k  = pos << (LN - 1 - stage);
  end

  cplx_t a, b, wb;
  assign a = mem[cbank][a_idx];
  assign b = mem[cbank][b_idx];

  logic [PHASE_W-1:0] tw_phase;
  assign tw_phase = -(PHASE_W'(tw_k) << (PHASE_W - LN));
  cordic_rotate u_tw (.x(b), .phase(tw_phase), .y(wb));

  cplx_t na, nb;
  always_comb begin
    logic signed [DW:0] sr, si, dr, di;
    sr = (DW+1)'(a.re) + (DW+1)'(wb.re);
    si = (DW+1)'(a.im) + (DW+1)'(wb.im);
    dr = (DW+1)'(a.re) - (DW+1)'(wb.re);
    di = (DW+1)'(a.im) - (DW+1)'(wb.im);
    na.re = sr[DW:1]; na.im = si[DW:1];
    nb.re = dr[DW:1]; nb.im = di[DW:1];
  end

  logic load_done;
  assign load_done = in_valid && in_idx == LN'(N - 1);

  // memory writes: input side and butterfly side use different banks
  always_ff @(posedge clk) begin
    if (in_valid) mem[wbank][bitrev(in_idx)] <= x;
    if (state == CALC) begin
      mem[cbank][a_idx] <= na;
      mem[cbank][b_idx] <= nb;
    end
  end

  logic start_calc;
  assign start_calc = (state == IDLE) && pend;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= IDLE;
      wbank     <= 1'b0;
      cbank     <= 1'b0;
      pend      <= 1'b0;
      stage     <= '0;
      bfly      <= '0;
      rd        <= '0;
      out_valid <= 1'b0;
      bin       <= '0;
      xf        <= '0;
      out_sop   <= 1'b0;
      out_eop   <= 1'b0;
      overflow  <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_sop   <= 1'b0;
      out_eop   <= 1'b0;
      overflow  <= 1'b0;
      if (load_done) begin
        if (pend && !start_calc) begin
          overflow <= 1'b1;          // both banks busy: drop this symbol
        end else begin
          pend  <= 1'b1;
          wbank <= ~wbank;
        end
      end
      case (state)
        IDLE: if (pend) begin
          state <= CALC;
          cbank <= ~wbank;
          stage <= '0;
          bfly  <= '0;
          if (!load_done) pend <= 1'b0;
        end
        CALC: begin
          bfly <= bfly + 1'b1;
          if (bfly == '1) begin
            stage <= stage + 1'b1;
            if (stage == LN'(LN - 1)) begin
              state <= DUMP;
              rd    <= '0;
            end
          end
        end
        DUMP: begin
          out_valid <= 1'b1;
          bin       <= rd;
          xf        <= mem[cbank][rd];
          out_sop   <= rd == '0;
          out_eop   <= rd == '1;
          rd        <= rd + 1'b1;
          if (rd == '1) state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
