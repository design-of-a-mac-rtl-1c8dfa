// mx_adder_tree: balanced binary tree summing the block's signed products.
//
// 2^LEVELS two's complement inputs of IN_W bits are added pairwise, one level
// at a time; each level widens its words by one bit so no sum can overflow.
// With the default 5 levels, 32 products of 37 bits give a 42-bit exact
// block sum (sum_of_products). The tree is purely combinational; the MAC
// registers its output.
//
// Interface: in[i] signed IN_W-bit words, sum the signed IN_W+LEVELS-bit
// total. The level count and the 37-bit-in / 42-bit-out widths are from the
// architecture diagram.
module mx_adder_tree #(
  parameter int unsigned LEVELS = 5,
  parameter int unsigned IN_W   = 37
) (
  input  logic [(1<<LEVELS)-1:0][IN_W-1:0] in,
  output logic [IN_W+LEVELS-1:0]           sum
);

  localparam int unsigned N = 1 << LEVELS;

  for (genvar l = 0; l <= LEVELS; l++) begin : g_lvl
    // level l holds N >> l words of IN_W + l bits
    logic signed [IN_W+l-1:0] v [N>>l];
    if (l == 0) begin : g_leaf
      for (genvar i = 0; i < N; i++) begin : g_in
        assign v[i] = signed'(in[i]);
      end
    end else begin : g_add
      for (genvar i = 0; i < (N >> l); i++) begin : g_node
        assign v[i] = (IN_W+l)'(g_lvl[l-1].v[2*i]) + (IN_W+l)'(g_lvl[l-1].v[2*i+1]);
      end
    end
  end

  assign sum = g_lvl[LEVELS].v[0];

endmodule
