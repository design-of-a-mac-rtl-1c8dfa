// mx_exp_adders: the bank of exponent adders, one per element pair.
//
// Adds the offset exponents of A and B element by element. With 4-bit offset
// exponents (0..14) each sum is 5 bits (0..28); it is the left shift that
// places the significand product on the 36-bit fixed-point grid.
//
// Interface: combinational; sums[i] = exps_a[i] + exps_b[i].
// The diagram gives the bank (32 adders, 32x4 in, 32x5 out).
module mx_exp_adders
  import mx_pkg::*;
#(
  parameter int unsigned N = N_ELEM
) (
  input  logic [N-1:0][EXP_W-1:0]  exps_a,
  input  logic [N-1:0][EXP_W-1:0]  exps_b,
  output logic [N-1:0][PEXP_W-1:0] sums
);

  always_comb begin
    for (int i = 0; i < N; i++)
      sums[i] = PEXP_W'(exps_a[i]) + PEXP_W'(exps_b[i]);
  end

endmodule
