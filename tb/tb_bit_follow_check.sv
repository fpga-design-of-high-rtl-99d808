// tb_bit_follow_check: for random low/high pairs with a forced underflow run,
// every candidate prefix length's follow count is compared with a bit-serial
// count of (high = 0, low = 1) positions below the candidate's first bit.
module tb_bit_follow_check;
  logic [15:0] low, high;
  logic [3:0]  follow [16];
  int checks = 0, failures = 0;
  bit_follow_check dut (.low(low), .high(high), .follow(follow));
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 5000; n++) begin
      int c, f;
      // build: c common bits, then 1/0, then f positions of 0/1, then random
      c = $urandom % 16;
      f = $urandom % (16 - c);
      low = 16'($urandom); high = low;
      if (n % 4 != 3) begin
        high[15-c] = 1'b1; low[15-c] = 1'b0;
        for (int i = 0; i < f; i++) begin high[14-c-i] = 1'b0; low[14-c-i] = 1'b1; end
        for (int i = 15 - c - f - 1; i >= 0; i--) high[i] = $urandom;
      end else begin
        high = 16'($urandom);
      end
      #1;
      for (int cc = 0; cc < 16; cc++) begin
        int e;
        e = 0;
        for (int i = 14 - cc; i >= 0; i--) begin
          if (!high[i] && low[i]) e++;
          else break;
        end
        checks++;
        if (follow[cc] !== 4'(e)) begin
          failures++;
          if (failures < 5) $display("bfc low=%h high=%h c=%0d got %0d exp %0d", low, high, cc, follow[cc], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
