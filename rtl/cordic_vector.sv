// cordic_vector: combinational CORDIC vectoring; returns the phase angle of
// a complex value (atan2), as a phase word with a full turn = 2**PHASE_W.
//
// The vector is first folded into the right half plane (a 180 degree offset
// is remembered), then CORDIC_ITER micro-rotations drive the imaginary part
// to zero while the applied rotations are summed. IW is the input width; the
// internal width adds two bits for the CORDIC growth. This design's own
// helper, used by the fractional CFO estimator.
module cordic_vector
  import stbc_pkg::*;
#(
  parameter int unsigned IW = 40
) (
  input  logic signed [IW-1:0] x_re,
  input  logic signed [IW-1:0] x_im,
  output logic [PHASE_W-1:0]   angle
);
  localparam int AW = IW + 2;
  always_comb begin
    logic signed [AW-1:0] a, b, t;
    logic [PHASE_W-1:0] z;
    a = AW'(x_re);
    b = AW'(x_im);
    z = '0;
    if (a < 0) begin
      a = -a;
      b = -b;
      z = PHASE_W'(1) << (PHASE_W - 1);
    end
    for (int i = 0; i < int'(CORDIC_ITER); i++) begin
      if (b > 0) begin
        t = a + (b >>> i);
        b = b - (a >>> i);
        a = t;
        z = z + cordic_atan(i);
      end else begin
        t = a - (b >>> i);
        b = b + (a >>> i);
        a = t;
        z = z - cordic_atan(i);
      end
    end
    angle = z;
  end
endmodule
