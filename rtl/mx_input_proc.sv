// mx_input_proc: decodes one block of MX elements onto the common E4M3 grid.
//
// Each 8-bit element slot is read according to the block's format: E4M3 uses
// all 8 bits, the FP6 formats (E3M2, E2M3) bits [5:0] and FP4 (E2M1) bits
// [3:0]; unused upper bits are ignored. Every element is rewritten as
// sign, a 4-bit offset exponent (e + 6, so 0..14) and a 4-bit significand
// with the hidden bit in bit 3, such that value = (-1)^s * sig * 2^(exp - 9).
// Narrower mantissas are padded with zeros on the right; subnormals get a
// zero hidden bit and the format's minimum exponent. Because every supported
// format's exponent range lies inside E4M3's, this mapping is exact, which
// is how one E4M3 x E4M3 datapath also serves the lower-precision formats.
//
// The only special encoding is the E4M3 NaN (S.1111.111); it raises `nan`.
// A reserved format code also raises `nan`.
//
// Interface: purely combinational. fmt is the block's element format
// (mx_pkg::mx_fmt_e code), elems the N element slots, element i in
// elems[i]. Outputs per element: signs[i], exps[i], sigs[i].
//
// The diagram names this block and its outputs (signs, exps 4 bits,
// significands); the slot layout and the grid mapping are this design's.
module mx_input_proc
  import mx_pkg::*;
#(
  parameter int unsigned N = N_ELEM
) (
  input  logic [2:0]                   fmt,
  input  logic [N-1:0][ELEM_W-1:0]     elems,
  output logic [N-1:0]                 signs,
  output logic [N-1:0][EXP_W-1:0]      exps,
  output logic [N-1:0][SIG_W-1:0]      sigs,
  output logic                         nan
);

  logic [N-1:0] elem_nan;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      logic [7:0] x;
      x           = elems[i];
      elem_nan[i] = 1'b0;
      unique case (fmt)
        FMT_E4M3: begin  // bias 7, e = E - 7, subnormal e = -6
          signs[i]    = x[7];
          exps[i]     = (x[6:3] == 4'd0) ? 4'd0 : x[6:3] - 4'd1;
          sigs[i]     = {x[6:3] != 4'd0, x[2:0]};
          elem_nan[i] = (x[6:0] == 7'h7F);
        end
        FMT_E3M2: begin  // bias 3, e = E - 3, subnormal e = -2
          signs[i] = x[5];
          exps[i]  = (x[4:2] == 3'd0) ? 4'd4 : {1'b0, x[4:2]} + 4'd3;
          sigs[i]  = {x[4:2] != 3'd0, x[1:0], 1'b0};
        end
        FMT_E2M3: begin  // bias 1, e = E - 1, subnormal e = 0
          signs[i] = x[5];
          exps[i]  = (x[4:3] == 2'd0) ? 4'd6 : {2'b0, x[4:3]} + 4'd5;
          sigs[i]  = {x[4:3] != 2'd0, x[2:0]};
        end
        FMT_E2M1: begin  // bias 1, e = E - 1, subnormal e = 0
          signs[i] = x[3];
          exps[i]  = (x[2:1] == 2'd0) ? 4'd6 : {2'b0, x[2:1]} + 4'd5;
          sigs[i]  = {x[2:1] != 2'd0, x[0], 2'b00};
        end
        default: begin   // reserved format code
          signs[i] = 1'b0;
          exps[i]  = '0;
          sigs[i]  = '0;
        end
      endcase
    end
  end

  assign nan = (|elem_nan) | (fmt > FMT_E2M1);

endmodule
