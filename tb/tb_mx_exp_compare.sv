// tb_mx_exp_compare: exhaustive test of the exponent compare. For every FP32
// exponent field and every scale sum a block can have (-254..+252), the
// LSB exponent of fp_in (zero and subnormals weigh like exponent field 1)
// and its distance to the block grid's LSB, scale_sum - 18, are checked.
module tb_mx_exp_compare;
  import mx_pkg::*;

  logic [7:0]               exp_fp_in;
  logic signed [SSUM_W-1:0] scale_sum, exp_diff, e_fp;

  mx_exp_compare dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int e = 0; e < 256; e++)
      for (int s = -254; s <= 252; s++) begin
        int lsb_f, lsb_s;
        exp_fp_in = 8'(e);
        scale_sum = SSUM_W'(s);
        #1;
        lsb_f = (e == 0 ? 1 : e) - 127 - 23;
        lsb_s = s - 18;
        checks++;
        if (int'(e_fp) != lsb_f || int'(exp_diff) != lsb_f - lsb_s) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
