// mx_exp_compare: compares the exponent of fp_in with the block's scale.
//
// fp_in's 24-bit significand has its LSB at 2^e_fp with
// e_fp = max(E, 1) - 150 (E the biased FP32 exponent field; subnormals and
// zero use E = 1). The block sum's LSB lies at 2^(scale_sum - 18) on the
// 36-bit product grid. exp_diff is the distance between the two LSBs,
// e_fp - (scale_sum - 18), which tells the final adder how to line the two
// operands up. e_fp is passed on for the result exponent.
//
// Interface: combinational. exp_diff range is -385..+376, 11-bit signed as
// on the diagram.
module mx_exp_compare
  import mx_pkg::*;
(
  input  logic [7:0]               exp_fp_in,
  input  logic signed [SSUM_W-1:0] scale_sum,
  output logic signed [SSUM_W-1:0] exp_diff,
  output logic signed [SSUM_W-1:0] e_fp
);

  always_comb begin
    e_fp     = SSUM_W'((exp_fp_in == 8'd0) ? 11'sd1 : signed'({3'b000, exp_fp_in})) - SSUM_W'(150);
    exp_diff = e_fp - scale_sum + SSUM_W'(GRID_OFF);
  end

endmodule
