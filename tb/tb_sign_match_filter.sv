// tb_sign_match_filter: random sign-bit samples and coefficients; every
// output is compared with a +-1 complex correlation computed from the sample
// history, and an embedded copy of the preamble must give the full peak
// (re = 2L, im = 0). Checks the one-clock output latency.
module tb_sign_match_filter;
  localparam int L = 256;
  localparam int CW = $clog2(2 * L) + 2;
  logic clk = 0, rst_n = 0, in_valid = 0, sgn_i = 0, sgn_q = 0;
  logic [L-1:0] coef_i, coef_q;
  logic out_valid;
  logic signed [CW-1:0] corr_re, corr_im;
  logic [CW-1:0] metric;
  int checks = 0, failures = 0;
  bit hi [$], hq [$];

  sign_match_filter #(.L(L)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int peaks = 0;
    for (int k = 0; k < L; k++) begin coef_i[k] = $urandom; coef_q[k] = $urandom; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3 * L + 200; n++) begin
      int er, ei, si, sq, ci, cq;
      bit ins;
      ins = (n >= 400 && n < 400 + L);
      @(negedge clk);
      in_valid = 1;
      sgn_i = ins ? coef_i[n - 400] : 1'($urandom);
      sgn_q = ins ? coef_q[n - 400] : 1'($urandom);
      hi.push_back(sgn_i); hq.push_back(sgn_q);
      if (hi.size() > L) begin void'(hi.pop_front()); void'(hq.pop_front()); end
      @(negedge clk);
      in_valid = 0;
      // reference: window padded with the reset value (positive) at the front
      er = 0; ei = 0;
      for (int k = 0; k < L; k++) begin
        int idx;
        idx = k - (L - hi.size());
        si = (idx >= 0 && hi[idx]) ? -1 : 1;
        sq = (idx >= 0 && hq[idx]) ? -1 : 1;
        ci = coef_i[k] ? -1 : 1;
        cq = coef_q[k] ? -1 : 1;
        er += si * ci + sq * cq;
        ei += sq * ci - si * cq;
      end
      checks++;
      if (!out_valid || corr_re !== CW'(er) || corr_im !== CW'(ei) ||
          metric !== CW'((er < 0 ? -er : er) + (ei < 0 ? -ei : ei))) begin
        failures++;
        if (failures < 5) $display("n=%0d got %0d %0d exp %0d %0d", n, corr_re, corr_im, er, ei);
      end
      if (n == 400 + L - 1) begin
        checks++;
        if (corr_re != 2 * L || corr_im != 0) failures++;
        else peaks++;
      end
      @(negedge clk);
      checks++;
      if (out_valid) failures++;
    end
    $display("peaks seen %0d", peaks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
