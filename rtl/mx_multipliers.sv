// mx_multipliers: the bank of significand multipliers, one per element pair.
//
// Multiplies the 4-bit significands (hidden bit included) of A and B element
// by element into 8-bit unsigned raw products; the signs are handled later,
// in the two's complement converter. Every format is mapped onto the E4M3
// significand, so the same multipliers serve all formats.
//
// Interface: combinational; prods[i] = sigs_a[i] * sigs_b[i].
// The diagram gives a bank of 32 multipliers; it prints 32x8 significands and
// 32x16 products, i.e. the element storage width. The 36-bit derivation uses
// 4-bit precision per element, so this design multiplies 4 x 4 bits.
module mx_multipliers
  import mx_pkg::*;
#(
  parameter int unsigned N = N_ELEM
) (
  input  logic [N-1:0][SIG_W-1:0]  sigs_a,
  input  logic [N-1:0][SIG_W-1:0]  sigs_b,
  output logic [N-1:0][PROD_W-1:0] prods
);

  always_comb begin
    for (int i = 0; i < N; i++)
      prods[i] = PROD_W'(sigs_a[i]) * PROD_W'(sigs_b[i]);
  end

endmodule
