// mx_ref_pkg: bit-exact reference model of the MX MAC for the testbenches.
//
// Works from the format definitions directly, not from the RTL's common-grid
// mapping: every element is converted to an integer multiple of 2^-12, every
// product and fp_in to an integer multiple of 2^-300 in a 640-bit signed
// accumulator, which holds the exact sum for all operand values. The exact
// sum is then rounded once to FP32, round to nearest even, with subnormals
// and overflow to infinity.
package mx_ref_pkg;

  localparam int BIG = 640;
  typedef logic signed [BIG-1:0] big_t;

  // format code -> exponent bits, mantissa bits, bias
  function automatic void fmt_info(input int fmt, output int eb, output int mb, output int bias);
    case (fmt)
      0: begin eb = 4; mb = 3; bias = 7; end  // E4M3
      1: begin eb = 3; mb = 2; bias = 3; end  // E3M2
      2: begin eb = 2; mb = 3; bias = 1; end  // E2M3
      default: begin eb = 2; mb = 1; bias = 1; end  // E2M1
    endcase
  endfunction

  function automatic bit elem_is_nan(input int fmt, input logic [7:0] x);
    return fmt == 0 && x[6:0] == 7'h7F;
  endfunction

  // element value times 2^12, signed
  function automatic big_t elem_val(input int fmt, input logic [7:0] x);
    int eb, mb, bias, e, m, s;
    big_t v;
    fmt_info(fmt, eb, mb, bias);
    s = int'(x[eb+mb]);
    e = int'(x) >> mb & ((1 << eb) - 1);
    m = int'(x) & ((1 << mb) - 1);
    if (e == 0) v = big_t'(m) <<< (1 - bias - mb + 12);
    else        v = big_t'(32'((1 << mb) + m)) <<< (e - bias - mb + 12);
    return (s != 0) ? -v : v;
  endfunction

  // round an exact value acc * 2^-300 to FP32 (acc != 0)
  function automatic logic [31:0] round_fp32(input big_t acc);
    big_t mag, rem, half, kept;
    int   k, be, p;
    logic s;
    s   = acc < 0;
    mag = s ? -acc : acc;
    k   = 0;
    for (int i = 0; i < BIG; i++) if (mag[i]) k = i;
    be  = k - 300 + 127;
    p   = (be >= 1) ? k - 23 : 151;
    kept = mag >> p;
    rem  = mag & ((big_t'(1) <<< p) - 1);
    half = big_t'(1) <<< (p - 1);
    if (rem > half || (rem == half && kept[0])) kept = kept + 1;
    if (be >= 1) begin
      if (kept[24]) begin kept = kept >> 1; be = be + 1; end
      if (be >= 255) return {s, 8'hFF, 23'd0};
      return {s, 8'(be), kept[22:0]};
    end
    return {s, 7'd0, kept[23], kept[22:0]};
  endfunction

  // the complete operation
  // mode -> formats of block A and block B (7: reserved)
  function automatic void mode_fmts(input int mode, output int fa, output int fb);
    if (mode <= 3) begin fa = mode; fb = mode; end
    else begin fa = 0; fb = mode - 3; end
  endfunction

  // the complete operation, mode as on the MAC's mode input
  function automatic logic [31:0] mac(input logic [31:0] fp_in, input logic [7:0] sa,
                                     input logic [7:0] sb, input logic [255:0] ea,
                                     input logic [255:0] eb, input int mode);
    big_t acc, f;
    int   fe, fa, fb;
    if (mode > 6 || sa == 8'hFF || sb == 8'hFF) return 32'h7FC0_0000;
    mode_fmts(mode, fa, fb);
    if (fp_in[30:23] == 8'hFF && fp_in[22:0] != 0) return 32'h7FC0_0000;
    for (int i = 0; i < 32; i++)
      if (elem_is_nan(fa, ea[8*i +: 8]) || elem_is_nan(fb, eb[8*i +: 8])) return 32'h7FC0_0000;
    if (fp_in[30:23] == 8'hFF) return fp_in;
    acc = '0;
    for (int i = 0; i < 32; i++)
      acc += (elem_val(fa, ea[8*i +: 8]) * elem_val(fb, eb[8*i +: 8])) <<< (int'(sa) + int'(sb) + 22);
    if (acc == 0) return fp_in;
    fe = (fp_in[30:23] == 0) ? 1 : int'(fp_in[30:23]);
    f  = big_t'({fp_in[30:23] != 0, fp_in[22:0]}) <<< (fe + 150);
    acc += fp_in[31] ? -f : f;
    if (acc == 0) return 32'h0;
    return round_fp32(acc);
  endfunction

endpackage
