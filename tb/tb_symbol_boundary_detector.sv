// tb_symbol_boundary_detector: a preamble fragment matching one of the
// seven ICFO candidates is buried at a random position in random sign bits;
// the detector must report the index of its last sample and the candidate's
// signed offset. Several searches, each with a different candidate.
module tb_symbol_boundary_detector;
  localparam int L = 256, NI = 7, WIN = 1152;
  localparam int CW = $clog2(2 * L) + 2, IW = $clog2(WIN);
  logic clk = 0, rst_n = 0, in_valid = 0, sgn_i = 0, sgn_q = 0, start = 0;
  logic [L-1:0] coef_i [NI], coef_q [NI];
  logic busy, done;
  logic [IW-1:0] boundary;
  logic signed [3:0] icfo;
  logic [CW-1:0] peak_metric;
  int checks = 0, failures = 0;

  symbol_boundary_detector dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < NI; m++)
      for (int k = 0; k < L; k++) begin coef_i[m][k] = $urandom; coef_q[m][k] = $urandom; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4; t++) begin
      int m0, pos;
      m0 = (t * 3 + 1) % NI;
      pos = 50 + $urandom % (WIN - L - 100);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      checks++;
      if (!busy) failures++;
      for (int n = 0; n < WIN; n++) begin
        @(negedge clk);
        in_valid = 1;
        if (n >= pos && n < pos + L) begin
          sgn_i = coef_i[m0][n - pos]; sgn_q = coef_q[m0][n - pos];
        end else begin
          sgn_i = $urandom; sgn_q = $urandom;
        end
        @(negedge clk);
        in_valid = 0;
      end
      @(negedge clk);
      checks++;
      if (!done && busy) failures++;
      checks++;
      if (boundary !== IW'(pos + L - 1) || icfo !== 4'(m0 - 3) || peak_metric !== CW'(2 * L)) begin
        failures++;
        $display("search %0d: boundary %0d exp %0d, icfo %0d exp %0d, peak %0d", t, boundary,
                 pos + L - 1, icfo, m0 - 3, peak_metric);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
