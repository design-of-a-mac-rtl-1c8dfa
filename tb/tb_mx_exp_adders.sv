// tb_mx_exp_adders: exhaustive test of the exponent adder bank.
// Every pair of 4-bit exponents is applied in every lane in turn and the
// 5-bit sums are compared with integer addition.
module tb_mx_exp_adders;
  import mx_pkg::*;

  logic [N_ELEM-1:0][EXP_W-1:0]  exps_a, exps_b;
  logic [N_ELEM-1:0][PEXP_W-1:0] sums;

  mx_exp_adders dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int a = 0; a < 16; a++)
      for (int b = 0; b < 16; b++) begin
        for (int i = 0; i < N_ELEM; i++) begin
          exps_a[i] = 4'((a + i) % 16);
          exps_b[i] = 4'((b + 3 * i) % 16);
        end
        #1;
        for (int i = 0; i < N_ELEM; i++) begin
          checks++;
          if (int'(sums[i]) != (a + i) % 16 + (b + 3 * i) % 16) failures++;
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
