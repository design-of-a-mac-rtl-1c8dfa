// mx_align: places each significand product on the 36-bit fixed-point grid.
//
// A product sigA*sigB with exponent sum k (0..28) is worth
// sigA*sigB * 2^(k - 18) relative to the block's shared scale. Shifting the
// 8-bit product left by k gives an exact 36-bit unsigned fixed-point number
// (LSB weight 2^-18): 8 + 28 = 36 bits cover the largest (E4M3 max normal
// squared) and the smallest (E4M3 min subnormal squared) product, so no bit
// is ever lost.
//
// Interface: combinational; aligned[i] = prods[i] << shifts[i].
// The 36-bit width is the document's; the shift-by-exponent-sum is how this
// design realises it.
module mx_align
  import mx_pkg::*;
#(
  parameter int unsigned N = N_ELEM
) (
  input  logic [N-1:0][PROD_W-1:0]  prods,
  input  logic [N-1:0][PEXP_W-1:0]  shifts,
  output logic [N-1:0][ALIGN_W-1:0] aligned
);

  always_comb begin
    for (int i = 0; i < N; i++)
      aligned[i] = ALIGN_W'(prods[i]) << shifts[i];
  end

endmodule
