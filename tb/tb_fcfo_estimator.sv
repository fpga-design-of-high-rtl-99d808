// tb_fcfo_estimator: OFDM-like symbols (random body, cyclic prefix copied
// from the tail) with a known fractional CFO eps are fed in; the estimated
// angle must be 2*pi*eps within 0.002 subcarrier spacings and freq must be
// angle / N.
module tb_fcfo_estimator;
  import stbc_pkg::*;
  localparam int N = FFT_N, CP = CP_LEN;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0, in_valid = 0, start = 0;
  cplx_t x = '0;
  logic done;
  logic [PHASE_W-1:0] angle;
  logic signed [PHASE_W-1:0] freq;
  int checks = 0, failures = 0;
  real br [N], bi [N];

  fcfo_estimator dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int dones = 0;
  always @(posedge clk) if (done) dones++;

  initial begin
    real eps_list [5] = '{0.1, -0.3, 0.45, 0.0, -0.05};
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (eps_list[t]) begin
      real eps, est, d;
      int sa;
      eps = eps_list[t];
      for (int n = 0; n < N; n++) begin
        int r1, r2;
        r1 = int'($urandom % 16001) - 8000;
        r2 = int'($urandom % 16001) - 8000;
        br[n] = $itor(r1);
        bi[n] = $itor(r2);
      end
      for (int n = 0; n < N + CP; n++) begin
        int s;
        real a, vr, vi;
        s = (n < CP) ? n + N - CP : n - CP;
        a = 2.0 * PI * eps * n / N;
        vr = br[s] * $cos(a) - bi[s] * $sin(a);
        vi = br[s] * $sin(a) + bi[s] * $cos(a);
        @(negedge clk);
        in_valid = 1; start = (n == 0);
        x.re = 16'(int'(vr)); x.im = 16'(int'(vi));
      end
      @(negedge clk);
      in_valid = 0; start = 0;
      repeat (3) @(negedge clk);
      sa = $signed(angle);
      est = $itor(sa) / 16777216.0;
      d = est - eps;
      checks++;
      if (d > 0.002 || d < -0.002) begin
        failures++;
        $display("eps %f estimated %f", eps, est);
      end
      checks++;
      if (freq !== ($signed(angle) >>> 10)) failures++;
      checks++;
      if (dones != t + 1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
