// tb_lzd16: exhaustive check of the 16-bit leading zero detector against a
// bit-by-bit scan.
module tb_lzd16;
  logic [15:0] x;
  logic [3:0]  pos;
  logic        valid;
  int checks = 0, failures = 0;
  lzd16 dut (.x(x), .pos(pos), .valid(valid));
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < 65536; v++) begin
      int exp_pos; bit exp_v;
      x = 16'(v);
      #1;
      exp_pos = 0; exp_v = 0;
      for (int i = 15; i >= 0; i--) if (x[i]) begin exp_pos = 15 - i; exp_v = 1; break; end
      checks++;
      if (valid !== exp_v || (exp_v && pos !== 4'(exp_pos)) || (!exp_v && pos !== 0)) begin
        failures++;
        if (failures < 5) $display("lzd16 x=%h pos=%0d valid=%0d exp %0d/%0d", x, pos, valid, exp_pos, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
