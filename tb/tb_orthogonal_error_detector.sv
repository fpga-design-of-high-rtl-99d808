// tb_orthogonal_error_detector: drives a stream of low/high pairs (random
// ordered pairs plus directed underflow patterns) and checks every registered
// output against a bit-serial renormalisation model: shift out equal top
// bits, then remove (low = 01.., high = 10..) follow positions, accumulating
// follow bits until common bits appear. Also checks the one-cycle latency.
module tb_orthogonal_error_detector;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [15:0] low = 0, high = 0;
  logic out_valid, degenerate;
  logic [3:0] bit_count, follow_count;
  logic [15:0] bit_value, low_update, high_update;
  logic [7:0] follow_emit;
  int checks = 0, failures = 0;
  int pend = 0;

  orthogonal_error_detector dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_follow = 0, n_emit = 0, n_degen = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      logic [15:0] l, h, el, eh, ev;
      int c, f, ee; bit dg;
      l = 16'($urandom); h = 16'($urandom);
      if (h < l) begin el = h; h = l; l = el; end
      if (n % 5 == 1) begin   // directed underflow pattern
        int cc, ff;
        cc = $urandom % 8; ff = 1 + $urandom % 6;
        h = l;
        h[15-cc] = 1; l[15-cc] = 0;
        for (int i = 0; i < ff; i++) begin h[14-cc-i] = 0; l[14-cc-i] = 1; end
      end
      if (n % 97 == 5) h = l;
      // model
      el = l; eh = h; c = 0; f = 0; ev = 0; dg = (l == h);
      if (!dg) begin
        while (el[15] == eh[15]) begin
          ev[15-c] = eh[15]; c++; el = el << 1; eh = (eh << 1) | 16'd1;
        end
        while (el[14] && !eh[14]) begin
          f++; el = {1'b0, el[13:0], 1'b0}; eh = {1'b1, eh[13:0], 1'b1};
        end
      end
      ee = 0;
      if (!dg) begin
        if (c != 0) begin ee = pend; pend = f; end
        else pend = pend + f;
      end
      // drive
      @(negedge clk);
      in_valid = 1; low = l; high = h;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || degenerate !== dg || bit_count !== 4'(c) || bit_value !== ev ||
          follow_count !== 4'(f) || follow_emit !== 8'(ee) ||
          low_update !== (dg ? l : el) || high_update !== (dg ? h : eh)) begin
        failures++;
        if (failures < 6)
          $display("oed l=%h h=%h : c=%0d/%0d f=%0d/%0d v=%h/%h lu=%h/%h hu=%h/%h emit=%0d/%0d dg=%0d",
                   l, h, bit_count, c, follow_count, f, bit_value, ev, low_update, el,
                   high_update, eh, follow_emit, ee, degenerate);
      end
      if (f > 0) n_follow++;
      if (ee > 0) n_emit++;
      if (dg) n_degen++;
      @(negedge clk);
      checks++;
      if (out_valid) failures++;   // exactly one result per input
    end
    checks++;
    if (n_follow == 0 || n_emit == 0 || n_degen == 0) failures++;
    $display("follow steps %0d, emitted follow groups %0d, degenerate %0d", n_follow, n_emit, n_degen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
