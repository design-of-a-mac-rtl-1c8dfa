// tb_mx_multipliers: exhaustive test of the significand multiplier bank.
// Every pair of 4-bit significands is applied in every lane in turn and the
// 8-bit products are compared with integer multiplication.
module tb_mx_multipliers;
  import mx_pkg::*;

  logic [N_ELEM-1:0][SIG_W-1:0]  sigs_a, sigs_b;
  logic [N_ELEM-1:0][PROD_W-1:0] prods;

  mx_multipliers dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int a = 0; a < 16; a++)
      for (int b = 0; b < 16; b++) begin
        for (int i = 0; i < N_ELEM; i++) begin
          sigs_a[i] = 4'((a + i) % 16);
          sigs_b[i] = 4'((b + 5 * i) % 16);
        end
        #1;
        for (int i = 0; i < N_ELEM; i++) begin
          checks++;
          if (int'(prods[i]) != ((a + i) % 16) * ((b + 5 * i) % 16)) failures++;
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
