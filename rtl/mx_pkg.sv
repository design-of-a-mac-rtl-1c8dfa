// mx_pkg: types and widths shared by the MX MAC datapath.
//
// The MAC multiplies two blocks of 32 microscaling (MX) elements pairwise and
// adds the 32 products, scaled by the two blocks' shared E8M0 scales, to an
// FP32 accumulator input. Every element format is mapped onto one common grid,
// the grid of E4M3 (the widest format supported), so that one set of
// multipliers, aligners and adders serves all formats:
//
//   value = (-1)^sign * sig * 2^(exp - 9)
//
// where sig is a 4-bit significand with the hidden bit on top (E4M3 has p = 4)
// and exp is a 4-bit offset exponent, exp = e - e_min(E4M3) = e + 6, in 0..14.
// A product of two such elements is sigA*sigB * 2^(expA + expB - 18): an 8-bit
// significand product shifted left by at most 28 places gives the 36-bit
// fixed-point datapath, (8+8) - (-6-6) + 4 + 4 = 36 bits.
//
// The widths printed on the architecture diagram (36-bit align, 37-bit signed
// products, 42-bit tree sum, 67-bit final adder, 11-bit scale sum and
// exponent difference) are kept; the element-side widths (4-bit significand,
// 8-bit raw product) follow from the E4M3 precision used in the 36-bit
// derivation.
package mx_pkg;

  // Block geometry
  localparam int unsigned N_ELEM  = 32;  // elements sharing one scale
  localparam int unsigned ELEM_W  = 8;   // storage width of one element
  localparam int unsigned SCALE_W = 8;   // E8M0 shared scale

  // Element grid (E4M3 based)
  localparam int unsigned EXP_W   = 4;   // offset exponent e + 6
  localparam int unsigned SIG_W   = 4;   // significand incl. hidden bit
  localparam int unsigned PEXP_W  = 5;   // sum of two offset exponents
  localparam int unsigned PROD_W  = 8;   // significand product
  localparam int unsigned ALIGN_W = 36;  // fixed-point product
  localparam int unsigned TC_W    = 37;  // signed fixed-point product
  localparam int unsigned TREE_LV = 5;   // adder-tree levels, 2^5 = 32
  localparam int unsigned TREE_W  = 42;  // adder-tree output (37 + 5)

  // Accumulation side
  localparam int unsigned ACC_W   = 67;  // final adder width
  localparam int unsigned SSUM_W  = 11;  // scale sum / exponent difference
  localparam int unsigned EW_W    = 12;  // window LSB exponent (signed)
  localparam int unsigned SH_W    = 7;   // normalisation shift amount

  // Offset of the 36-bit grid: a tree sum S at scale sum X stands for
  // S * 2^(X - GRID_OFF), X = scaleA + scaleB - 254 (unbiased).
  localparam int GRID_OFF = 18;

  // Element formats of one block. Codes 4..7 are not formats; given to the
  // input processing they flag NaN. (The MAC's 3-bit mode input is a
  // different code that selects a format for each of the two blocks.)
  typedef enum logic [2:0] {
    FMT_E4M3 = 3'd0,  // MXFP8
    FMT_E3M2 = 3'd1,  // MXFP6
    FMT_E2M3 = 3'd2,  // MXFP6
    FMT_E2M1 = 3'd3   // MXFP4
  } mx_fmt_e;

  // One decoded element on the common grid
  typedef struct packed {
    logic             sign;
    logic [EXP_W-1:0] exp;
    logic [SIG_W-1:0] sig;
  } mx_elem_t;

  // IEEE-754 single precision
  typedef struct packed {
    logic        sign;
    logic [7:0]  exp;
    logic [22:0] frac;
  } fp32_t;

  localparam logic [31:0] FP32_QNAN = 32'h7FC0_0000;

endpackage
