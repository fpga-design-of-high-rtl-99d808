// lzd16: leading zero detector for a 16-bit word.
//
// pos is the number of zero bits above the most significant one of x
// (0 when x[15] is set, 15 when only x[0] is set). valid is low when x is
// all zeros; pos is then 0. Purely combinational. The name and the 16-bit
// width follow the leading bit check description (an LZD16 circuit); the
// priority-encoder form is this design's own.
module lzd16 (
  input  logic [15:0] x,
  output logic [3:0]  pos,
  output logic        valid
);
  always_comb begin
    pos   = '0;
    valid = 1'b0;
    for (int i = 0; i < 16; i++) begin
      if (!valid && x[15-i]) begin
        pos   = 4'(i);
        valid = 1'b1;
      end
    end
  end
endmodule
