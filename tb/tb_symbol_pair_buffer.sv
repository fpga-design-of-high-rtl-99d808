// tb_symbol_pair_buffer: four symbols of distinct random values; the
// second and fourth must come out paired bin by bin with the first and
// third, and pair_clr must restart the pairing.
module tb_symbol_pair_buffer;
  import stbc_pkg::*;
  localparam int N = FFT_N;
  logic clk = 0, rst_n = 0, in_valid = 0, eop = 0, pair_clr = 0;
  logic [9:0] bin = '0, out_bin;
  cplx_t x = '0, y1, y2;
  logic out_valid;
  int checks = 0, failures = 0;
  cplx_t sy [5][N];

  symbol_pair_buffer dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int outs = 0;
    for (int s = 0; s < 5; s++)
      for (int k = 0; k < N; k++) sy[s][k] = cplx_t'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    // symbols 0..4; pair_clr before symbol 2 after an odd symbol count: 0,(1) pair; 2 lone; clr; 3,4 pair
    for (int s = 0; s < 5; s++) begin
      if (s == 3) begin @(negedge clk); pair_clr = 1; @(negedge clk); pair_clr = 0; end
      for (int k = 0; k < N; k++) begin
        int kk;
        kk = (k * 37 + s) % N;   // any order
        @(negedge clk);
        in_valid = 1; bin = 10'(kk); x = sy[s][kk]; eop = (k == N - 1);
        @(negedge clk);
        in_valid = 0; eop = 0;
        checks++;
        if (s == 1 || s == 4) begin
          if (!out_valid || out_bin !== 10'(kk) || y1 !== sy[s-1][kk] || y2 !== sy[s][kk]) begin
            failures++;
            if (failures < 5) $display("s=%0d k=%0d mismatch", s, kk);
          end
          outs++;
        end else if (out_valid) failures++;
      end
    end
    checks++;
    if (outs != 2 * N) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
