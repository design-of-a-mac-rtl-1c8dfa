// tb_mx_scale_add: exhaustive test of the shared-scale addition: for every
// pair of E8M0 scales the signed sum must be XA + XB - 254 and the NaN flag
// set exactly when either scale is 0xFF.
module tb_mx_scale_add;
  import mx_pkg::*;

  logic [7:0]               scale_a, scale_b;
  logic signed [SSUM_W-1:0] scale_sum;
  logic                     nan;

  mx_scale_add dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) begin
        scale_a = 8'(a);
        scale_b = 8'(b);
        #1;
        checks++;
        if (nan != (a == 255 || b == 255)) failures++;
        if (a != 255 && b != 255) begin
          checks++;
          if (int'(scale_sum) != a + b - 254) failures++;
        end
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
