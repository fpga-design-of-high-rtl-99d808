// orthogonal_error_detector: one renormalisation step of a 16-bit low/high
// interval pair, built from a leading bit check, a bit follow check and
// register files.
//
// Each accepted (low, high) pair is examined in one cycle:
//   * the leading bit check (XOR + LZD16) gives c, the number of common
//     leading bits; these bits are settled and are reported as bit_count and
//     bit_value (left aligned, lower bits zero);
//   * the bit follow check evaluates the follow (underflow) run length for
//     all 16 possible prefix lengths and a 16:1 multiplexer steered by c picks
//     f, the number of follow bits of this step;
//   * the low and high register files receive the renormalised interval:
//     the c common bits are shifted out (low fills with 0, high with 1), then
//     the f follow bits below the top bit are removed the same way while the
//     top bit of low stays 0 and that of high stays 1;
//   * the bit follow register file accumulates follow bits until common bits
//     appear again. follow_emit tells how many follow bits (each the inverse
//     of the first bit of bit_value) go out right after the first bit of
//     bit_value; it is non-zero only when bit_count is.
// A pair with low == high has no differing bit: it is flagged degenerate and
// returned unchanged with bit_count 0.
//
// Interface: in_valid/low/high in; one cycle later out_valid with the
// results, all registered (output register file). Throughput one pair per
// cycle, active-low synchronous reset.
//
// The block structure (LBC, BFC, 16:1 mux, bit follow, low, high and output
// register files, 16-bit ports bit_count, bit_value, low_update,
// high_update) follows the description. The renormalisation rules, the
// follow accumulation and the degenerate flag are this design's own reading
// of what the detector does; the description also says the 16-bit updates
// carry 8 address and 8 data bits, a split that is left to the user.
module orthogonal_error_detector #(
  parameter int unsigned PEND_W = 8     // width of the follow-bit accumulator
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [15:0]       low,
  input  logic [15:0]       high,
  output logic              out_valid,
  output logic [3:0]        bit_count,
  output logic [15:0]       bit_value,
  output logic [PEND_W-1:0] follow_emit,
  output logic [3:0]        follow_count,
  output logic [15:0]       low_update,
  output logic [15:0]       high_update,
  output logic              degenerate
);
  logic [3:0]  pos_cs;
  logic        diff_found;
  logic [3:0]  follow_all [16];
  logic [3:0]  f_sel;

  leading_bit_check u_lbc (.low(low), .high(high), .pos(pos_cs), .valid(diff_found));
  bit_follow_check  u_bfc (.low(low), .high(high), .follow(follow_all));

  // 16:1 multiplexer
  assign f_sel = diff_found ? follow_all[pos_cs] : 4'd0;

  // renormalisation
  logic [15:0] low_s, high_s, low_n, high_n, val_n;
  logic [14:0] low_t, high_t;
  always_comb begin
    low_s  = low << pos_cs;
    high_s = (high << pos_cs) | ((16'd1 << pos_cs) - 16'd1);
    low_t  = low_s[14:0] << f_sel;
    high_t = (high_s[14:0] << f_sel) | ((15'd1 << f_sel) - 15'd1);
    low_n  = {1'b0, low_t};
    high_n = {1'b1, high_t};
    val_n  = high & ~(16'hFFFF >> pos_cs);
    if (!diff_found) begin
      low_n  = low;
      high_n = high;
      val_n  = '0;
    end
  end

  // bit follow register file
  logic [PEND_W-1:0] pending;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pending <= '0;
    end else if (in_valid && diff_found) begin
      if (pos_cs != 0) pending <= PEND_W'(f_sel);
      else             pending <= pending + PEND_W'(f_sel);
    end
  end

  // low, high and output register files
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid    <= 1'b0;
      bit_count    <= '0;
      bit_value    <= '0;
      follow_emit  <= '0;
      follow_count <= '0;
      low_update   <= '0;
      high_update  <= '0;
      degenerate   <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        bit_count    <= diff_found ? pos_cs : 4'd0;
        bit_value    <= val_n;
        follow_emit  <= (diff_found && pos_cs != 0) ? pending : '0;
        follow_count <= f_sel;
        low_update   <= low_n;
        high_update  <= high_n;
        degenerate   <= !diff_found;
      end
    end
  end
endmodule
