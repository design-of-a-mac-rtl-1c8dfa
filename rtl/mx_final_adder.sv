// mx_final_adder: adds the FP32 accumulator input to the block sum.
//
// Operands: F, fp_in's signed 24-bit significand (LSB weight 2^e_fp), and
// S, the 42-bit signed block sum (LSB weight 2^(e_fp - exp_diff)). Both are
// placed in one 67-bit two's complement window and added. The window is
// chosen from exp_diff (d) so that the result is exact, or, where bits must
// be dropped, so that at least the 24 result bits plus a guard bit stay in
// the window and the dropped bits are kept as a sticky flag:
//
//   S == 0 or d > 42  : F at bit 42, S shifted right by d - 42 (sticky)
//   0 <= d <= 42      : S at bit 0, F shifted left by d          (exact)
//   -25 <= d < 0      : F at bit 0, S shifted left by -d         (exact)
//   d < -25           : S at bit 25, F shifted right by -d - 25  (sticky)
//
// The right shifts are arithmetic (rounding toward minus infinity), so the
// true sum is W + f with 0 <= f < 1 window LSB and f > 0 exactly when the
// sticky flag is set. The magnitude is W when W >= 0, otherwise -W, or ~W
// (= -W - 1) when sticky, so that magnitude plus sticky again describes the
// true value. Whenever bits are dropped the result keeps its leading one at
// window bit 24 or above, or its LSB at or above the FP32 subnormal LSB, so
// rounding later sees correct guard and sticky bits.
//
// An exact zero takes fp_in's sign when the block sum is zero (the sum then
// is fp_in itself) and is +0 otherwise.
//
// Interface: combinational. e_w is the exponent of window bit 0.
// The document gives the 67-bit width and the 42-bit tree input; the window
// selection and the sticky handling are this design's.
module mx_final_adder
  import mx_pkg::*;
(
  input  logic [TREE_W-1:0]        sum_of_products,  // signed
  input  logic                     fp_sign,
  input  logic [23:0]              fp_sig,           // hidden bit included
  input  logic signed [SSUM_W-1:0] exp_diff,
  input  logic signed [SSUM_W-1:0] e_fp,
  output logic                     res_sign,
  output logic [ACC_W-1:0]         res_mag,
  output logic                     sticky,
  output logic signed [EW_W-1:0]   e_w
);

  logic signed [ACC_W-1:0] f_ext, s_ext, w, f_part, s_part, lost_mask;
  logic                    s_zero;
  int                      sh;

  always_comb begin
    f_ext  = fp_sign ? -ACC_W'(fp_sig) : ACC_W'(fp_sig);
    s_ext  = ACC_W'(signed'(sum_of_products));
    s_zero = (sum_of_products == '0);
    sticky = 1'b0;
    sh     = 0;
    lost_mask = '0;

    if (s_zero || exp_diff > 42) begin
      sh        = s_zero ? 0 : ((int'(exp_diff) - 42 > 63) ? 63 : int'(exp_diff) - 42);
      f_part    = f_ext <<< 42;
      s_part    = s_ext >>> sh;
      lost_mask = ~(ACC_W'(-1) << sh);
      sticky    = |(s_ext & lost_mask);
      e_w       = EW_W'(e_fp) - EW_W'(42);
    end else if (exp_diff >= 0) begin
      f_part = f_ext <<< exp_diff;
      s_part = s_ext;
      e_w    = EW_W'(e_fp) - EW_W'(exp_diff);
    end else if (exp_diff >= -25) begin
      f_part = f_ext;
      s_part = s_ext <<< (-exp_diff);
      e_w    = EW_W'(e_fp);
    end else begin
      sh        = (-int'(exp_diff) - 25 > 63) ? 63 : -int'(exp_diff) - 25;
      f_part    = f_ext >>> sh;
      s_part    = s_ext <<< 25;
      lost_mask = ~(ACC_W'(-1) << sh);
      sticky    = |(f_ext & lost_mask);
      e_w       = EW_W'(e_fp) - EW_W'(exp_diff) - EW_W'(25);
    end

    w = f_part + s_part;

    if (w < 0) begin
      res_sign = 1'b1;
      res_mag  = sticky ? ~w : -w;
    end else begin
      res_sign = (w == 0 && !sticky) ? (s_zero & fp_sign) : 1'b0;
      res_mag  = w;
    end
  end

endmodule
