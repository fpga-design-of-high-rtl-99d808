// tb_leading_bit_check: random and directed low/high pairs; the common
// prefix length is counted bit by bit.
module tb_leading_bit_check;
  logic [15:0] low, high;
  logic [3:0]  pos;
  logic        valid;
  int checks = 0, failures = 0;
  leading_bit_check dut (.low(low), .high(high), .pos(pos), .valid(valid));
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check();
    int c = 0;
    #1;
    while (c < 16 && low[15-c] == high[15-c]) c++;
    checks++;
    if ((c == 16 && (valid || pos != 0)) || (c < 16 && (!valid || pos != 4'(c)))) begin
      failures++;
      if (failures < 5) $display("lbc low=%h high=%h pos=%0d valid=%0d exp %0d", low, high, pos, valid, c);
    end
  endtask
  initial begin
    for (int c = 0; c <= 16; c++) begin
      // directed: exactly c common bits
      low = 16'($urandom);
      high = low;
      if (c < 16) high[15-c] = ~low[15-c];
      check();
    end
    for (int n = 0; n < 20000; n++) begin
      low = 16'($urandom);
      high = low ^ (16'($urandom) >> ($urandom % 17));
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
