// mx_twos_comp: turns sign-magnitude products into 37-bit two's complement.
//
// The sign of each product is the exclusive-or of the two element signs; a
// negative product is negated, a positive one zero-extended by one bit. The
// 37-bit results feed the adder tree.
//
// Interface: combinational; tc[i] = (signs_a[i] ^ signs_b[i]) ? -mag[i] : mag[i].
// Widths (36 in, 37 out) are from the diagram.
module mx_twos_comp
  import mx_pkg::*;
#(
  parameter int unsigned N = N_ELEM
) (
  input  logic [N-1:0]                     signs_a,
  input  logic [N-1:0]                     signs_b,
  input  logic [N-1:0][ALIGN_W-1:0]        mag,
  output logic [N-1:0][TC_W-1:0]           tc
);

  always_comb begin
    for (int i = 0; i < N; i++) begin
      if (signs_a[i] ^ signs_b[i]) tc[i] = -TC_W'(mag[i]);
      else                         tc[i] =  TC_W'(mag[i]);
    end
  end

endmodule
