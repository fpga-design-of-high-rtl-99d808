// tb_preamble_match: random received values and preamble signs; the output
// must be +-y * 181/1024 rounded to nearest (ties up), and lie within one LSB
// of +-y / (4*sqrt(2)). Checks the one-clock latency.
module tb_preamble_match;
  import stbc_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, psign = 0;
  cplx_t y = '0, h;
  logic out_valid;
  int checks = 0, failures = 0;

  preamble_match dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_val(int v, bit s);
    int p = (s ? -v : v) * 181;
    return (p + 512) >>> 10;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      int yr, yi, er, ei;
      real fr;
      yr = int'($urandom % 65536) - 32768;
      yi = int'($urandom % 65536) - 32768;
      @(negedge clk);
      in_valid = 1; y.re = 16'(yr); y.im = 16'(yi); psign = $urandom;
      @(negedge clk);
      in_valid = 0;
      er = ref_val(yr, psign); ei = ref_val(yi, psign);
      fr = (psign ? -yr : yr) / (4.0 * $sqrt(2.0));
      checks++;
      if (!out_valid || h.re !== 16'(er) || h.im !== 16'(ei) ||
          (fr - $itor(h.re)) > 1.5 || ($itor(h.re) - fr) > 1.5) begin
        failures++;
        if (failures < 5) $display("y=%0d,%0d s=%0d got %0d,%0d exp %0d,%0d", yr, yi, psign, h.re, h.im, er, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
