// tb_stbc_decoder: random channels and QPSK/16QAM symbols are sent through
// the noiseless Alamouti equations; the combiner must return exactly
// g*s1, g*s2 and g = |h1|^2 + |h2|^2. One-clock latency is checked.
module tb_stbc_decoder;
  import stbc_pkg::*;
  localparam int OW = 2 * DW + 2;
  logic clk = 0, rst_n = 0, in_valid = 0;
  cplx_t y1 = '0, y2 = '0, h1 = '0, h2 = '0;
  logic out_valid;
  logic signed [OW-1:0] z1_re, z1_im, z2_re, z2_im;
  logic [OW-1:0] g;
  int checks = 0, failures = 0;

  stbc_decoder dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int lvl();
    int l = int'($urandom % 4);
    return (2 * l - 3) * 1000;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      longint a1r, a1i, a2r, a2i, s1r, s1i, s2r, s2i, gg;
      longint y1r, y1i, y2r, y2i;
      a1r = int'($urandom % 4001) - 2000; a1i = int'($urandom % 4001) - 2000;
      a2r = int'($urandom % 4001) - 2000; a2i = int'($urandom % 4001) - 2000;
      s1r = lvl(); s1i = lvl(); s2r = lvl(); s2i = lvl();
      // scale products down so y fits 16 bits: h in units of 1/1024
      y1r = (a1r * s1r - a1i * s1i + a2r * s2r - a2i * s2i);
      y1i = (a1r * s1i + a1i * s1r + a2r * s2i + a2i * s2r);
      // y2 = -h1*conj(s2) + h2*conj(s1)
      y2r = -(a1r * s2r + a1i * s2i) + (a2r * s1r + a2i * s1i);
      y2i = -(a1i * s2r - a1r * s2i) + (a2i * s1r - a2r * s1i);
      // keep exact: use h/32 and s scaled so y stays in range
      @(negedge clk);
      in_valid = 1;
      h1.re = 16'(a1r); h1.im = 16'(a1i); h2.re = 16'(a2r); h2.im = 16'(a2i);
      // y values exceed 16 bits for these magnitudes; send y/1000 exactly
      y1.re = 16'(y1r / 1000); y1.im = 16'(y1i / 1000);
      y2.re = 16'(y2r / 1000); y2.im = 16'(y2i / 1000);
      @(negedge clk);
      in_valid = 0;
      gg = a1r * a1r + a1i * a1i + a2r * a2r + a2i * a2i;
      checks++;
      if (!out_valid || g !== OW'(gg) ||
          z1_re !== OW'(gg * s1r / 1000) || z1_im !== OW'(gg * s1i / 1000) ||
          z2_re !== OW'(gg * s2r / 1000) || z2_im !== OW'(gg * s2i / 1000)) begin
        failures++;
        if (failures < 5) $display("n=%0d z1=%0d,%0d z2=%0d,%0d g=%0d exp g=%0d s1=%0d,%0d s2=%0d,%0d",
                                   n, z1_re, z1_im, z2_re, z2_im, g, gg, s1r, s1i, s2r, s2i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
