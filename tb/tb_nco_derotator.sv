// tb_nco_derotator: random samples and frequency words; each output must
// equal x[n] * exp(-j*n*freq) computed in floating point, within 3 LSB.
// Also checks that phase_clr restarts the phase.
module tb_nco_derotator;
  import stbc_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, phase_clr = 0;
  cplx_t x = '0, y;
  logic signed [PHASE_W-1:0] freq = '0;
  logic out_valid;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979;

  nco_derotator dut (.*);
  always #5 clk = ~clk;

  function automatic real rabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ph;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4; t++) begin
      @(negedge clk);
      freq = PHASE_W'(int'($urandom % (1 << PHASE_W)));
      if (t % 2 == 0) begin
        // clear on its own clock
        phase_clr = 1;
        @(negedge clk);
        phase_clr = 0;
      end
      ph = 0;
      for (int n = 0; n < 1500; n++) begin
        int xr, xi;
        real a, er, ei;
        xr = int'($urandom % 40001) - 20000;
        xi = int'($urandom % 40001) - 20000;
        @(negedge clk);
        in_valid = 1; x.re = 16'(xr); x.im = 16'(xi);
        phase_clr = (t % 2 == 1 && n == 0);   // clear together with a sample
        @(negedge clk);
        in_valid = 0; phase_clr = 0;
        a = -2.0 * PI * $itor(ph) / 16777216.0;
        er = xr * $cos(a) - xi * $sin(a);
        ei = xr * $sin(a) + xi * $cos(a);
        checks++;
        if (!out_valid || rabs(er - $itor(y.re)) > 3.0 || rabs(ei - $itor(y.im)) > 3.0) begin
          failures++;
          if (failures < 5) $display("t=%0d n=%0d got %0d,%0d exp %f,%f", t, n, y.re, y.im, er, ei);
        end
        ph = (ph + longint'(freq)) % (longint'(1) << PHASE_W);
        if (ph < 0) ph += longint'(1) << PHASE_W;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
