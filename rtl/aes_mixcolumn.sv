// aes_mixcolumn: MixColumns / InvMixColumns of one 32-bit state column,
// built without multipliers.
//
// Forward: each output byte is {02}*a ^ {03}*b ^ c ^ d, where {02}* is one
// left shift with conditional reduction (xtime) and {03}*b is xtime(b)^b.
// Inverse: the inverse coefficients are split as
//   {0e} = {02}+{08}+{04}, {0b} = {03}+{08}, {0d} = {01}+{08}+{04},
//   {09} = {01}+{08},
// so InvMixColumns is the forward result plus {08} times the sum of all four
// bytes plus {04} times (s[i] ^ s[i+2]) for output row i. The forward
// MixColumns network is therefore shared by both directions, and the
// inverse only adds two more xtime steps per term. That split is the
// described design's; the grouping of the {08} and {04} terms into two shared
// sums per column is this design's.
// Purely combinational. Row 0 of the column is col_i[31:24].
// With HAS_INV = 0 the inverse correction is not built and `inv` is unused.
module aes_mixcolumn
  import aes_pkg::*;
#(
  parameter bit HAS_INV = 1'b1
) (
  input  logic  inv,
  input  word_t col_i,
  output word_t col_o
);

  logic [7:0] s  [4];
  logic [7:0] s2 [4];   // {02} * s
  logic [7:0] mc [4];   // forward MixColumns
  logic [7:0] sum8, x4_02, x4_13;

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      s[i]  = col_i[31-8*i -: 8];
      s2[i] = xtime(s[i]);
    end
    for (int i = 0; i < 4; i++) begin
      mc[i] = s2[i] ^ (s2[(i+1)%4] ^ s[(i+1)%4]) ^ s[(i+2)%4] ^ s[(i+3)%4];
    end
    // {08}*(s0^s1^s2^s3) and {04}*(s0^s2), {04}*(s1^s3)
    sum8  = xtime(xtime(xtime(s[0] ^ s[1] ^ s[2] ^ s[3])));
    x4_02 = xtime(xtime(s[0] ^ s[2]));
    x4_13 = xtime(xtime(s[1] ^ s[3]));
    for (int i = 0; i < 4; i++) begin
      if (HAS_INV && inv)
        col_o[31-8*i -: 8] = mc[i] ^ sum8 ^ ((i % 2 == 0) ? x4_02 : x4_13);
      else
        col_o[31-8*i -: 8] = mc[i];
    end
  end

endmodule
