// leading_bit_check (LBC16): length of the common leading bit string of the
// low and high interval registers.
//
// A 16-bit XOR marks every position where low and high differ; an LZD16 then
// finds the first such position. pos is the number of common leading bits
// (0..15) and valid is high when low and high differ somewhere. When they
// are equal (valid low) all 16 bits are common and pos is 0. The XOR plus
// LZD16 structure follows the description; the block is combinational.
module leading_bit_check (
  input  logic [15:0] low,
  input  logic [15:0] high,
  output logic [3:0]  pos,
  output logic        valid
);
  logic [15:0] diff;
  assign diff = low ^ high;
  lzd16 u_lzd (.x(diff), .pos(pos), .valid(valid));
endmodule
