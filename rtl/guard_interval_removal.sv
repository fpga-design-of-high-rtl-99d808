// guard_interval_removal: symbol framing after the boundary is known (FFT
// control).
//
// sync marks the first cyclic-prefix sample of an OFDM symbol. From there
// the block counts samples modulo N + CP, drops the CP samples and passes the
// N useful samples on with their index (0 .. N-1), sop on index 0 and eop on
// index N-1, and counts the symbols passed since the last sync (sym_cnt,
// 0 for the first symbol). A new sync restarts the framing at any time.
//
// Interface: in_valid/x/sync in, out_valid/y/idx/sop/eop one clock later.
// Guard interval removal and FFT control as functions follow the receiver
// architecture; the counting scheme is this design's own.
module guard_interval_removal
  import stbc_pkg::*;
#(
  parameter int unsigned N  = FFT_N,
  parameter int unsigned CP = CP_LEN,
  parameter int unsigned SW = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  cplx_t                  x,
  input  logic                   sync,
  output logic                   out_valid,
  output cplx_t                  y,
  output logic [$clog2(N)-1:0]   idx,
  output logic                   sop,
  output logic                   eop,
  output logic [SW-1:0]          sym_cnt
);
  localparam int unsigned CW = $clog2(N + CP);
  logic [CW-1:0] cnt;
  logic          locked;
  logic [SW-1:0] scnt;

  logic [CW-1:0] cur;
  assign cur = sync ? '0 : cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt       <= '0;
      locked    <= 1'b0;
      scnt      <= '0;
      out_valid <= 1'b0;
      y         <= '0;
      idx       <= '0;
      sop       <= 1'b0;
      eop       <= 1'b0;
      sym_cnt   <= '0;
    end else begin
      out_valid <= 1'b0;
      sop       <= 1'b0;
      eop       <= 1'b0;
      if (in_valid && (sync || locked)) begin
        locked <= 1'b1;
        cnt    <= (cur == CW'(N + CP - 1)) ? '0 : cur + 1'b1;
        if (sync) scnt <= '0;
        else if (cur == CW'(N + CP - 1)) scnt <= scnt + 1'b1;
        if (cur >= CW'(CP)) begin
          out_valid <= 1'b1;
          y         <= x;
          idx       <= $clog2(N)'(cur - CW'(CP));
          sop       <= cur == CW'(CP);
          eop       <= cur == CW'(N + CP - 1);
          sym_cnt   <= sync ? '0 : scnt;
        end
      end
    end
  end
endmodule
