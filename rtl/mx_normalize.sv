// mx_normalize: leading-zero count and barrel shift of the 67-bit magnitude.
//
// The magnitude (LSB weight 2^e_w, always below 2^66) is shifted left so
// that its leading one lands in bit 66, in a single barrel-shifter pass with
// no extra cycle. If that would give an exponent below the FP32 normal
// range, the shift is limited to 192 + e_w instead, which puts the FP32
// subnormal LSB (2^-149) at bit 43: the result is then subnormal and bit 66
// stays zero. Bits 66..43 of `norm` are the 24 result bits, bit 42 the guard
// bit, bits 41..0 feed the sticky bit.
//
// Interface: combinational. shamt is the applied left shift (0..67).
// The barrel shifter for the leading-zero normalisation is the document's;
// the subnormal limit is this design's.
module mx_normalize
  import mx_pkg::*;
(
  input  logic [ACC_W-1:0]       mag,
  input  logic signed [EW_W-1:0] e_w,
  output logic [ACC_W-1:0]       norm,
  output logic [SH_W-1:0]        shamt
);

  logic [SH_W-1:0]       lzc;
  logic signed [EW_W:0]  lim;

  always_comb begin
    lzc = SH_W'(ACC_W);
    for (int i = 0; i < ACC_W; i++)
      if (mag[i]) lzc = SH_W'(ACC_W - 1 - i);
    lim = (EW_W+1)'(e_w) + (EW_W+1)'(192);
    if (lim < 0)                     shamt = '0;
    else if (lim < (EW_W+1)'(lzc))   shamt = SH_W'(lim);
    else                             shamt = lzc;
    norm = mag << shamt;
  end

endmodule
