// tb_fft_radix2: three symbols (random, a single tone, random) are written
// at one sample per 7 clocks, back to back; every bin is compared with a
// floating-point DFT divided by N (tolerance 4 LSB). Also checks the
// transform time (N/2*log2(N) butterfly clocks before the first bin) and
// that no overflow occurs at this rate.
module tb_fft_radix2;
  import stbc_pkg::*;
  localparam int N = FFT_N, LN = 10;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [LN-1:0] in_idx = '0, bin;
  cplx_t x = '0, xf;
  logic out_valid, out_sop, out_eop, overflow;
  int checks = 0, failures = 0;
  real xr [3][N], xi [3][N];
  int  sym_out = 0;
  longint t_load [3], t_first [3];
  longint cyc = 0;

  fft_radix2 dut (.*, .x(x));
  always #5 clk = ~clk;

  function automatic real rabs(real v);
    return v < 0.0 ? -v : v;
  endfunction
  always @(posedge clk) cyc++;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker
  always @(posedge clk) begin
    if (rst_n && overflow) begin checks++; failures++; $display("overflow at %0d", cyc); end
    if (out_valid && sym_out < 3) begin
      real er, ei, a;
      int s, kn;
      s = sym_out;
      if (out_sop) t_first[s] = cyc;
      er = 0; ei = 0;
      for (int n = 0; n < N; n++) begin
        kn = (int'(bin) * n) % N;
        a = -2.0 * PI * $itor(kn) / N;
        er += xr[s][n] * $cos(a) - xi[s][n] * $sin(a);
        ei += xr[s][n] * $sin(a) + xi[s][n] * $cos(a);
      end
      er /= N; ei /= N;
      checks++;
      if (rabs(er - $itor(xf.re)) > 4.0 || rabs(ei - $itor(xf.im)) > 4.0) begin
        failures++;
        if (failures < 5) $display("sym %0d bin %0d got %0d,%0d exp %f,%f", s, bin, xf.re, xf.im, er, ei);
      end
      if (out_eop) sym_out++;
    end
  end

  initial begin
    for (int s = 0; s < 3; s++)
      for (int n = 0; n < N; n++) begin
        if (s == 1) begin
          xr[s][n] = $rtoi(12000.0 * $cos(2.0 * PI * 37 * n / N));
          xi[s][n] = $rtoi(12000.0 * $sin(2.0 * PI * 37 * n / N));
        end else begin
          int r1, r2;
          r1 = int'($urandom % 30001) - 15000;
          r2 = int'($urandom % 30001) - 15000;
          xr[s][n] = $itor(r1);
          xi[s][n] = $itor(r2);
        end
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 3; s++) begin
      for (int n = 0; n < N + CP_LEN; n++) begin
        @(negedge clk);
        if (n < N) begin
          in_valid = 1; in_idx = LN'(n);
          x.re = 16'($rtoi(xr[s][n])); x.im = 16'($rtoi(xi[s][n]));
          if (n == N - 1) t_load[s] = cyc;
        end
        @(negedge clk);
        in_valid = 0;
        repeat (5) @(negedge clk);
      end
    end
    wait (sym_out == 3);
    for (int s = 0; s < 3; s++) begin
      checks++;
      // load at t_load, IDLE->CALC one clock later, 5120 butterflies, first bin next
      if (t_first[s] - t_load[s] < N / 2 * LN || t_first[s] - t_load[s] > N / 2 * LN + 6) begin
        failures++;
        $display("sym %0d: first bin %0d clocks after load", s, t_first[s] - t_load[s]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
