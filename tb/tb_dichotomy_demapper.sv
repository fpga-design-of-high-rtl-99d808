// tb_dichotomy_demapper: random gains g and constellation points
// z = g * level / sqrt(10) (16QAM) or g * (+-1/sqrt(2)) (QPSK) with a little
// noise; the decided bits must reproduce the transmitted Gray labels.
module tb_dichotomy_demapper;
  import stbc_pkg::*;
  localparam int ZW = 2 * DW + 2;
  logic clk = 0, rst_n = 0, in_valid = 0;
  mod_t mode = MOD_QPSK;
  logic signed [ZW-1:0] z_re = 0, z_im = 0;
  logic [ZW-1:0] g = 0;
  logic out_valid;
  logic [3:0] bits;
  int checks = 0, failures = 0;

  dichotomy_demapper dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      int li, lq, nz;
      real gr, zr, zi, sc;
      logic [3:0] exp_b;
      mod_t md;
      md = mod_t'(n % 2);
      gr = 1000.0 + $urandom % 10000000;
      li = 2 * int'($urandom % 4) - 3;
      lq = 2 * int'($urandom % 4) - 3;
      if (md == MOD_QPSK) begin
        li = li < 0 ? -1 : 1; lq = lq < 0 ? -1 : 1;
        sc = 1.0 / $sqrt(2.0);
        exp_b = {2'b00, li < 0, lq < 0};
      end else begin
        sc = 1.0 / $sqrt(10.0);
        exp_b = {li < 0, li == 1 || li == -1, lq < 0, lq == 1 || lq == -1};
      end
      nz = int'($urandom % 200) - 100;
      zr = gr * li * sc * (1.0 + $itor(nz) / 400.0);
      nz = int'($urandom % 200) - 100;
      zi = gr * lq * sc * (1.0 + $itor(nz) / 400.0);
      @(negedge clk);
      in_valid = 1; mode = md;
      g = ZW'(longint'(gr)); z_re = ZW'(longint'(zr)); z_im = ZW'(longint'(zi));
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || bits !== exp_b) begin
        failures++;
        if (failures < 5) $display("md=%0d g=%0d z=%0d,%0d bits=%b exp %b", md, g, z_re, z_im, bits, exp_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
