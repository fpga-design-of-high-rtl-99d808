// tb_guard_interval_removal: a counting sample stream with a sync pulse; the
// output must be exactly the N useful samples of each symbol, in order, with
// index, sop/eop and symbol count, and a second sync must re-frame.
module tb_guard_interval_removal;
  import stbc_pkg::*;
  localparam int N = FFT_N, CP = CP_LEN;
  logic clk = 0, rst_n = 0, in_valid = 0, sync = 0;
  cplx_t x = '0, y;
  logic out_valid, sop, eop;
  logic [9:0] idx;
  logic [7:0] sym_cnt;
  int checks = 0, failures = 0;

  guard_interval_removal dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int sync_at [2] = '{37, 37 + 2 * (N + CP) + 500};
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < sync_at[1] + 2 * (N + CP); n++) begin
      int ref_n, rel, s;
      @(negedge clk);
      in_valid = 1;
      sync = (n == sync_at[0] || n == sync_at[1]);
      x.re = 16'(n); x.im = 16'(-n);
      @(negedge clk);
      in_valid = 0; sync = 0;
      ref_n = (n >= sync_at[1]) ? sync_at[1] : sync_at[0];
      rel = n - ref_n;
      s = rel / (N + CP);
      rel = rel % (N + CP);
      checks++;
      if (n < sync_at[0] || rel < CP) begin
        if (out_valid) failures++;
      end else if (!out_valid || y.re !== 16'(n) || y.im !== 16'(-n) || idx !== 10'(rel - CP) ||
                   sop !== (rel == CP) || eop !== (rel == N + CP - 1) || sym_cnt !== 8'(s)) begin
        failures++;
        if (failures < 5) $display("n=%0d idx=%0d rel=%0d sym=%0d", n, idx, rel, sym_cnt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
