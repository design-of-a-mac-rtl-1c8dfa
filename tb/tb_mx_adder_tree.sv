// tb_mx_adder_tree: tests the 5-level, 32-input adder tree at its default
// widths (37 bits in, 42 out). Random vectors, and vectors of all-maximum
// and all-minimum values that need every extra bit of the tree, are
// compared with a 64-bit signed sum.
module tb_mx_adder_tree;
  localparam int LEVELS = 5, IN_W = 37, N = 1 << LEVELS;

  logic [N-1:0][IN_W-1:0] in;
  logic [IN_W+LEVELS-1:0] sum;

  mx_adder_tree dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int n = 0; n < 2000; n++) begin
      longint want;
      want = 0;
      for (int i = 0; i < N; i++) begin
        case (n % 4)
          0: in[i] = {1'b0, {(IN_W-1){1'b1}}};          // most positive
          1: in[i] = {1'b1, {(IN_W-1){1'b0}}};          // most negative
          default: in[i] = {5'($urandom), 32'($urandom)};
        endcase
        if (n % 7 == 3 && i % 3 == 0) in[i] = '0;
        want += longint'(signed'(in[i]));
      end
      #1;
      checks++;
      if (longint'(signed'(sum)) != want) begin
        failures++;
        $display("ERROR: sum %0d expected %0d", longint'(signed'(sum)), want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
