// mx_mac: MX block multiply-accumulate unit (MXFP8 / MXFP6 / MXFP4).
//
// Computes, once per clock,
//
//   fp_out = RNE_fp32( fp_in + 2^(scale_a-127) * 2^(scale_b-127)
//                              * sum_{i<32} elems_a[i] * elems_b[i] )
//
// for two blocks of 32 MX elements sharing E8M0 scales, with a single
// rounding at the end: the 32 products and their sum are exact (36-bit
// fixed-point products, 42-bit tree sum), and only the final FP32 result is
// rounded. fp_in is the previous result when the unit is used as an
// accumulator; the feedback path is outside this module.
//
// Pipeline (4 stages, one new operation per cycle, latency 4 cycles):
//   1  input processing, exponent adders, significand multipliers,
//      scale addition, exponent compare
//   2  36-bit align, two's complement conversion, 5-level adder tree
//   3  67-bit final adder (fp_in + block sum)
//   4  normalise (barrel shifter), round, exponent update, special cases
// An operation presented with in_valid = 1 at a rising edge appears on
// fp_out with out_valid = 1 four rising edges later. Only the valid bits are
// reset (rst_n, active low, synchronous); the data registers need no reset.
//
// mode selects the element formats (block A x block B):
//   0 E4M3 x E4M3 (MXFP8)   1 E3M2 x E3M2 (MXFP6)   2 E2M3 x E2M3 (MXFP6)
//   3 E2M1 x E2M1 (MXFP4)   4 E4M3 x E3M2   5 E4M3 x E2M3   6 E4M3 x E2M1
//   7 reserved, gives NaN.
// Codes 4..6 are mixed-precision products of an MXFP8 block with a lower
// precision block; all formats run through the same E4M3-sized logic.
// FP6 elements sit in bits [5:0] of their 8-bit slot, FP4 in bits [3:0].
// Special values: a NaN anywhere (fp_in, an E4M3 element, a scale of 0xFF,
// the reserved mode) gives the quiet NaN 0x7FC00000; an infinite fp_in passes
// through; a result beyond the FP32 range becomes a signed infinity.
// Subnormal fp_in values and subnormal results are handled exactly.
//
// The block structure, the widths and the stage count follow the document's
// architecture; the stage boundaries, the handshake, the mode encoding and
// the special-value rules are this design's choices.
module mx_mac
  import mx_pkg::*;
(
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_valid,
  input  logic [31:0]                  fp_in,
  input  logic [SCALE_W-1:0]           scale_a,
  input  logic [SCALE_W-1:0]           scale_b,
  input  logic [N_ELEM-1:0][ELEM_W-1:0] elems_a,
  input  logic [N_ELEM-1:0][ELEM_W-1:0] elems_b,
  input  logic [2:0]                   mode,
  output logic                         out_valid,
  output logic [31:0]                  fp_out
);

  // ---------------------------------------------------------------- stage 1
  logic [N_ELEM-1:0]              sgn_a, sgn_b;
  logic [N_ELEM-1:0][EXP_W-1:0]   exp_a, exp_b;
  logic [N_ELEM-1:0][SIG_W-1:0]   sig_a, sig_b;
  logic [N_ELEM-1:0][PEXP_W-1:0]  pexp;
  logic [N_ELEM-1:0][PROD_W-1:0]  raw_products;
  logic                           nan_a, nan_b, nan_scale;
  logic signed [SSUM_W-1:0]       scale_sum, exp_diff, e_fp;
  fp32_t                          fpi;
  logic                           fpi_nan, fpi_inf;

  assign fpi     = fp32_t'(fp_in);
  assign fpi_nan = (fpi.exp == 8'hFF) && (fpi.frac != '0);
  assign fpi_inf = (fpi.exp == 8'hFF) && (fpi.frac == '0);

  logic [2:0] fmt_a, fmt_b;

  always_comb begin
    unique case (mode)
      3'd4:    begin fmt_a = FMT_E4M3; fmt_b = FMT_E3M2; end
      3'd5:    begin fmt_a = FMT_E4M3; fmt_b = FMT_E2M3; end
      3'd6:    begin fmt_a = FMT_E4M3; fmt_b = FMT_E2M1; end
      3'd7:    begin fmt_a = 3'd7;     fmt_b = 3'd7;     end  // reserved
      default: begin fmt_a = mode;     fmt_b = mode;     end
    endcase
  end

  mx_input_proc u_in_a (.fmt(fmt_a), .elems(elems_a), .signs(sgn_a), .exps(exp_a),
                        .sigs(sig_a), .nan(nan_a));
  mx_input_proc u_in_b (.fmt(fmt_b), .elems(elems_b), .signs(sgn_b), .exps(exp_b),
                        .sigs(sig_b), .nan(nan_b));
  mx_exp_adders  u_eadd (.exps_a(exp_a), .exps_b(exp_b), .sums(pexp));
  mx_multipliers u_mul  (.sigs_a(sig_a), .sigs_b(sig_b), .prods(raw_products));
  mx_scale_add   u_sadd (.scale_a, .scale_b, .scale_sum, .nan(nan_scale));
  mx_exp_compare u_ecmp (.exp_fp_in(fpi.exp), .scale_sum, .exp_diff, .e_fp);

  logic                           s1_valid;
  logic [N_ELEM-1:0]              s1_sgn_a, s1_sgn_b;
  logic [N_ELEM-1:0][PEXP_W-1:0]  s1_pexp;
  logic [N_ELEM-1:0][PROD_W-1:0]  s1_prod;
  logic signed [SSUM_W-1:0]       s1_exp_diff, s1_e_fp;
  logic                           s1_fp_sign;
  logic [23:0]                    s1_fp_sig;
  logic                           s1_nan, s1_inf;
  logic [31:0]                    s1_fp_in;

  always_ff @(posedge clk) begin
    s1_sgn_a    <= sgn_a;
    s1_sgn_b    <= sgn_b;
    s1_pexp     <= pexp;
    s1_prod     <= raw_products;
    s1_exp_diff <= exp_diff;
    s1_e_fp     <= e_fp;
    s1_fp_sign  <= fpi.sign;
    s1_fp_sig   <= {fpi.exp != 8'd0, fpi.frac};
    s1_nan      <= nan_a | nan_b | nan_scale | fpi_nan;
    s1_inf      <= fpi_inf;
    s1_fp_in    <= fp_in;
  end

  // ---------------------------------------------------------------- stage 2
  logic [N_ELEM-1:0][ALIGN_W-1:0] aligned_products;
  logic [N_ELEM-1:0][TC_W-1:0]    tc_products;
  logic [TREE_W-1:0]              sum_of_products;

  mx_align      u_align (.prods(s1_prod), .shifts(s1_pexp), .aligned(aligned_products));
  mx_twos_comp  u_tc    (.signs_a(s1_sgn_a), .signs_b(s1_sgn_b), .mag(aligned_products),
                         .tc(tc_products));
  mx_adder_tree #(.LEVELS(TREE_LV), .IN_W(TC_W)) u_tree (.in(tc_products), .sum(sum_of_products));

  logic                           s2_valid;
  logic [TREE_W-1:0]              s2_sum;
  logic signed [SSUM_W-1:0]       s2_exp_diff, s2_e_fp;
  logic                           s2_fp_sign;
  logic [23:0]                    s2_fp_sig;
  logic                           s2_nan, s2_inf;
  logic [31:0]                    s2_fp_in;

  always_ff @(posedge clk) begin
    s2_sum      <= sum_of_products;
    s2_exp_diff <= s1_exp_diff;
    s2_e_fp     <= s1_e_fp;
    s2_fp_sign  <= s1_fp_sign;
    s2_fp_sig   <= s1_fp_sig;
    s2_nan      <= s1_nan;
    s2_inf      <= s1_inf;
    s2_fp_in    <= s1_fp_in;
  end

  // ---------------------------------------------------------------- stage 3
  logic                           res_sign, res_sticky;
  logic [ACC_W-1:0]               res_mag;
  logic signed [EW_W-1:0]         res_e_w;

  mx_final_adder u_fadd (.sum_of_products(s2_sum), .fp_sign(s2_fp_sign), .fp_sig(s2_fp_sig),
                         .exp_diff(s2_exp_diff), .e_fp(s2_e_fp), .res_sign, .res_mag,
                         .sticky(res_sticky), .e_w(res_e_w));

  logic                           s3_valid;
  logic                           s3_sign, s3_sticky;
  logic [ACC_W-1:0]               s3_mag;
  logic signed [EW_W-1:0]         s3_e_w;
  logic                           s3_nan, s3_inf;
  logic [31:0]                    s3_fp_in;

  always_ff @(posedge clk) begin
    s3_sign   <= res_sign;
    s3_sticky <= res_sticky;
    s3_mag    <= res_mag;
    s3_e_w    <= res_e_w;
    s3_nan    <= s2_nan;
    s3_inf    <= s2_inf;
    s3_fp_in  <= s2_fp_in;
  end

  // ---------------------------------------------------------------- stage 4
  logic [ACC_W-1:0]               norm;
  logic [SH_W-1:0]                shamt;
  logic [22:0]                    frac;
  logic                           hidden, carry, overflow;
  logic [7:0]                     exp_out;
  logic [31:0]                    result;

  mx_normalize  u_norm  (.mag(s3_mag), .e_w(s3_e_w), .norm, .shamt);
  mx_post_round u_round (.norm, .sticky_in(s3_sticky), .frac, .hidden, .carry);
  mx_exp_update u_eupd  (.e_w(s3_e_w), .shamt, .norm_msb(norm[ACC_W-1]), .hidden, .carry,
                         .exp_out, .overflow);

  always_comb begin
    if (s3_nan)        result = FP32_QNAN;
    else if (s3_inf)   result = s3_fp_in;
    else if (overflow) result = {s3_sign, 8'hFF, 23'd0};
    else               result = {s3_sign, exp_out, frac};
  end

  always_ff @(posedge clk) fp_out <= result;

  // Invariants the rounding relies on: the summed magnitude stays below
  // 2^66 (bit 66 is free for normalisation) and the window never lies so
  // low that the subnormal LSB would fall above bit 43 (e_w >= -191).
  a_mag_range: assert property (@(posedge clk) disable iff (!rst_n)
                                s3_valid |-> !s3_mag[ACC_W-1]);
  a_window_low: assert property (@(posedge clk) disable iff (!rst_n)
                                 s3_valid |-> (s3_e_w >= -EW_W'(191)));

  // ------------------------------------------------------------ valid chain
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_valid  <= 1'b0;
      s2_valid  <= 1'b0;
      s3_valid  <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      s1_valid  <= in_valid;
      s2_valid  <= s1_valid;
      s3_valid  <= s2_valid;
      out_valid <= s3_valid;
    end
  end

endmodule
