// cordic_rotate: combinational CORDIC rotation of a complex value by an
// arbitrary phase, with the CORDIC gain removed.
//
// The phase word covers a full turn in 2**PHASE_W steps. The two top phase
// bits select an exact multiple of 90 degrees (swap/negate); the remainder is
// re-centred to -45..+45 degrees and resolved by CORDIC_ITER micro-rotations
// with guard bits. The result is multiplied by 1/K (0.607253, Q15) and
// rounded back to DW bits. Used by the derotator and by the FFT butterfly
// for the twiddle multiplication. Entirely this design's own helper.
module cordic_rotate
  import stbc_pkg::*;
(
  input  cplx_t              x,
  input  logic [PHASE_W-1:0] phase,
  output cplx_t              y
);
  localparam int G  = 4;                 // guard bits
  localparam int XW = DW + G + 3;

  logic signed [XW-1:0] xr, xi;
  logic signed [XW+16-1:0] sr, si;
  always_comb begin
    logic signed [XW-1:0] a, b, t;
    logic signed [PHASE_W:0] z;
    logic [1:0] q;
    logic [PHASE_W-1:0] rem;
    a = XW'(x.re) <<< G;
    b = XW'(x.im) <<< G;
    q = phase[PHASE_W-1 -: 2];
    rem = {2'b00, phase[PHASE_W-3:0]};
    // re-centre the remainder to [-45, 45) degrees
    if (rem[PHASE_W-3]) begin
      q = q + 2'd1;
      z = $signed({1'b0, rem}) - $signed((PHASE_W+1)'(1) << (PHASE_W - 2));
    end else begin
      z = $signed({1'b0, rem});
    end
    // coarse rotation by q * 90 degrees
    case (q)
      2'd1:    begin t = a; a = -b; b = t;  end
      2'd2:    begin a = -a; b = -b;        end
      2'd3:    begin t = a; a = b;  b = -t; end
      default: ;
    endcase
    for (int i = 0; i < int'(CORDIC_ITER); i++) begin
      if (z >= 0) begin
        t = a - (b >>> i);
        b = b + (a >>> i);
        a = t;
        z = z - $signed({1'b0, cordic_atan(i)});
      end else begin
        t = a + (b >>> i);
        b = b - (a >>> i);
        a = t;
        z = z + $signed({1'b0, cordic_atan(i)});
      end
    end
    xr = a;
    xi = b;
    sr = (XW+16)'(xr) * (XW+16)'(CORDIC_INV_GAIN_Q15);
    si = (XW+16)'(xi) * (XW+16)'(CORDIC_INV_GAIN_Q15);
  end

  localparam int SH = 15 + G;
  logic signed [XW+16-1:0] rr, ri;
  assign rr = (sr + (XW+16)'(1 <<< (SH - 1))) >>> SH;
  assign ri = (si + (XW+16)'(1 <<< (SH - 1))) >>> SH;

  // saturate to DW bits
  function automatic logic signed [DW-1:0] sat(input logic signed [XW+16-1:0] v);
    if (v > (XW+16)'(2**(DW-1) - 1)) return {1'b0, {(DW-1){1'b1}}};
    if (v < -(XW+16)'(2**(DW-1)))    return {1'b1, {(DW-1){1'b0}}};
    return v[DW-1:0];
  endfunction

  assign y.re = sat(rr);
  assign y.im = sat(ri);
endmodule
