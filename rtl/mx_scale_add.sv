// mx_scale_add: combines the two E8M0 shared scales of the A and B blocks.
//
// An E8M0 scale X stands for 2^(X - 127); the code 0xFF is NaN. The product
// of the two scales is 2^(XA + XB - 254), so this block outputs the signed
// unbiased exponent sum XA + XB - 254 (range -254..+252 for non-NaN codes)
// as an 11-bit two's complement number, and flags a NaN scale.
//
// Interface: combinational. The 8-bit inputs and 11-bit scale sum are from
// the diagram; removing the bias here is this design's choice.
module mx_scale_add
  import mx_pkg::*;
(
  input  logic [SCALE_W-1:0]       scale_a,
  input  logic [SCALE_W-1:0]       scale_b,
  output logic signed [SSUM_W-1:0] scale_sum,
  output logic                     nan
);

  assign scale_sum = SSUM_W'(scale_a) + SSUM_W'(scale_b) - SSUM_W'(254);
  assign nan       = (scale_a == 8'hFF) || (scale_b == 8'hFF);

endmodule
