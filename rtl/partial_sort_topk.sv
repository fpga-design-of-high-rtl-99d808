// partial_sort_topk: partial sorting network that picks the NP strongest of
// NSUB time-domain channel taps (significant-path identification).
//
// Taps arrive one per clock with their delay index implied by arrival order
// (0 .. NSUB-1). Each tap's power |h|^2 is compared in parallel with all NP
// kept entries, which are held sorted by descending power; the tap is
// inserted at its place and the weakest entry drops out (an insertion
// network, one comparator per entry). After the last tap done pulses and
// path_idx / path_val / path_pow hold the NP strongest paths, strongest
// first; equal powers keep the earlier tap first.
//
// Interface: start clears the list; in_valid/h per tap; done one clock
// after tap NSUB-1. NSUB = 128 (the CP length) and NP = 8 follow the
// description of the decorrelator's path search; the insertion network is
// this design's own realisation of its partial sorting.
module partial_sort_topk
  import stbc_pkg::*;
#(
  parameter int unsigned NSUB = CP_LEN,
  parameter int unsigned NP   = 8,
  parameter int unsigned PW   = 2 * DW + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic                    in_valid,
  input  cplx_t                   h,
  output logic                    done,
  output logic [$clog2(NSUB)-1:0] path_idx [NP],
  output cplx_t                   path_val [NP],
  output logic [PW-1:0]           path_pow [NP],
  output logic [NP-1:0]           path_ok
);
  localparam int unsigned XW = $clog2(NSUB);
  logic [XW-1:0] cnt;

  logic [PW-1:0] pw;
  assign pw = PW'($signed(PW'(h.re) * PW'(h.re)) + $signed(PW'(h.im) * PW'(h.im)));

  logic ok_r [NP];
  always_comb
    for (int i = 0; i < int'(NP); i++) path_ok[i] = ok_r[i];

  // comparator per entry: the new tap beats entry i
  logic [NP-1:0] beat;
  always_comb
    for (int i = 0; i < int'(NP); i++) beat[i] = !ok_r[i] || pw > path_pow[i];

  always_ff @(posedge clk) begin
    if (!rst_n || start) begin
      cnt  <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (in_valid) begin
        cnt <= cnt + 1'b1;
        if (cnt == XW'(NSUB - 1)) done <= 1'b1;
      end
    end
  end

  for (genvar i = 0; i < int'(NP); i++) begin : g_entry
    // value that moves into entry i if the new tap lands above it
    logic [XW-1:0] up_idx;
    cplx_t         up_val;
    logic [PW-1:0] up_pow;
    logic          up_ok, ins_here;
    if (i == 0) begin : g_top
      assign up_idx   = cnt;
      assign up_val   = h;
      assign up_pow   = pw;
      assign up_ok    = 1'b1;
      assign ins_here = 1'b1;
    end else begin : g_rest
      assign up_idx   = path_idx[i-1];
      assign up_val   = path_val[i-1];
      assign up_pow   = path_pow[i-1];
      assign up_ok    = ok_r[i-1];
      assign ins_here = !beat[i-1];
    end
    always_ff @(posedge clk) begin
      if (!rst_n || start) begin
        path_idx[i] <= '0;
        path_val[i] <= '0;
        path_pow[i] <= '0;
        ok_r[i]     <= 1'b0;
      end else if (in_valid && beat[i]) begin
        if (ins_here) begin            // insertion point
          path_idx[i] <= cnt;
          path_val[i] <= h;
          path_pow[i] <= pw;
          ok_r[i]     <= 1'b1;
        end else begin                 // shift down
          path_idx[i] <= up_idx;
          path_val[i] <= up_val;
          path_pow[i] <= up_pow;
          ok_r[i]     <= up_ok;
        end
      end
    end
  end
endmodule
