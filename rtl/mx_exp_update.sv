// mx_exp_update: computes the FP32 exponent field of the result.
//
// A normal result (leading one in bit 66 before rounding) has the biased
// exponent 193 + e_w - shamt: the leading one sat at bit 66 - shamt of a
// window whose bit 0 weighs 2^e_w, and 66 + 127 = 193. A carry out of
// rounding adds one. A subnormal result has exponent field 0, or 1 when
// rounding carried it into the normal range. A field of 255 or more is an
// overflow, which the MAC turns into infinity.
//
// Interface: combinational. The block and its 8-bit output are from the
// diagram; the arithmetic is this design's.
module mx_exp_update
  import mx_pkg::*;
(
  input  logic signed [EW_W-1:0] e_w,
  input  logic [SH_W-1:0]        shamt,
  input  logic                   norm_msb,   // leading one in bit 66
  input  logic                   hidden,     // hidden bit after rounding
  input  logic                   carry,      // significand rounded to 2.0
  output logic [7:0]             exp_out,
  output logic                   overflow
);

  logic signed [EW_W+1:0] e;

  always_comb begin
    if (norm_msb)
      e = (EW_W+2)'(e_w) + (EW_W+2)'(193) - (EW_W+2)'(shamt) + (EW_W+2)'(carry);
    else
      e = (EW_W+2)'(hidden);
    overflow = (e >= 255);
    exp_out  = overflow ? 8'hFF : e[7:0];
  end

endmodule
