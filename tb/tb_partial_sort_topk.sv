// tb_partial_sort_topk: channel impulse responses of 128 taps (weak random
// taps plus a few strong paths, sometimes with equal powers) go through the
// partial sorter; the kept list must equal a full selection of the 8
// largest powers, strongest first, earlier tap first on ties.
module tb_partial_sort_topk;
  import stbc_pkg::*;
  localparam int NSUB = 128, NP = 8;
  logic clk = 0, rst_n = 0, start = 0, in_valid = 0;
  cplx_t h = '0;
  logic done;
  logic [6:0] path_idx [NP];
  cplx_t path_val [NP];
  logic [32:0] path_pow [NP];
  logic [NP-1:0] path_ok;
  int checks = 0, failures = 0;
  cplx_t taps [NSUB];
  longint pw [NSUB];

  partial_sort_topk dut (.*);
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
    for (int t = 0; t < 30; t++) begin
      bit used [NSUB];
      for (int k = 0; k < NSUB; k++) begin
        int a, b;
        a = int'($urandom % 201) - 100; b = int'($urandom % 201) - 100;
        if ($urandom % 12 == 0) begin a = a * 150; b = b * 150; end
        if (t % 3 == 0 && k % 16 == 5) begin a = 3000; b = -4000; end   // ties
        taps[k].re = 16'(a); taps[k].im = 16'(b);
        pw[k] = longint'(a) * a + longint'(b) * b;
        used[k] = 0;
      end
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      for (int k = 0; k < NSUB; k++) begin
        @(negedge clk); in_valid = 1; h = taps[k];
      end
      @(negedge clk); in_valid = 0;
      checks++;
      if (!done) failures++;
      for (int r = 0; r < NP; r++) begin
        int best;
        best = -1;
        for (int k = 0; k < NSUB; k++)
          if (!used[k] && (best < 0 || pw[k] > pw[best])) best = k;
        used[best] = 1;
        checks++;
        if (!path_ok[r] || path_idx[r] !== 7'(best) || path_val[r] !== taps[best] ||
            path_pow[r] !== 33'(pw[best])) begin
          failures++;
          if (failures < 5) $display("t=%0d rank %0d got tap %0d exp %0d", t, r, path_idx[r], best);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
