// mx_post_round: rounds the normalised magnitude to 24 bits, to nearest even.
//
// Takes bits 66..43 of the normalised magnitude as the significand, bit 42 as
// guard and the OR of bits 41..0 with the incoming sticky flag as sticky,
// and rounds to nearest, ties to even, which is FP32's default rounding. The
// 25-bit result is split into the 23 fraction bits, the rounded hidden bit
// and the carry out of a significand that rounded up to 2.0 (its fraction is
// then zero).
//
// Interface: combinational. The rounding mode is this design's choice; the
// document names the block and its 23-bit output.
module mx_post_round
  import mx_pkg::*;
(
  input  logic [ACC_W-1:0] norm,
  input  logic             sticky_in,
  output logic [22:0]      frac,
  output logic             hidden,
  output logic             carry
);

  logic [23:0] sig;
  logic        guard, sticky, round_up;
  logic [24:0] rounded;

  always_comb begin
    sig      = norm[ACC_W-1 -: 24];
    guard    = norm[ACC_W-25];
    sticky   = (|norm[ACC_W-26:0]) | sticky_in;
    round_up = guard & (sticky | sig[0]);
    rounded  = {1'b0, sig} + 25'(round_up);
    frac     = rounded[22:0];
    hidden   = rounded[23];
    carry    = rounded[24];
  end

endmodule
