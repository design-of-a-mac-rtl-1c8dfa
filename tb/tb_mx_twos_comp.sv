// tb_mx_twos_comp: tests the sign combination and two's complement
// conversion. Random and extreme 36-bit magnitudes with all four sign
// combinations are checked against signed 64-bit arithmetic.
module tb_mx_twos_comp;
  import mx_pkg::*;

  logic [N_ELEM-1:0]              signs_a, signs_b;
  logic [N_ELEM-1:0][ALIGN_W-1:0] mag;
  logic [N_ELEM-1:0][TC_W-1:0]    tc;

  mx_twos_comp dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int n = 0; n < 400; n++) begin
      for (int i = 0; i < N_ELEM; i++) begin
        signs_a[i] = 1'($urandom);
        signs_b[i] = 1'($urandom);
        case ($urandom % 4)
          0: mag[i] = '0;
          1: mag[i] = '1;
          default: mag[i] = {4'($urandom), 32'($urandom)};
        endcase
      end
      #1;
      for (int i = 0; i < N_ELEM; i++) begin
        longint want, got;
        want = (signs_a[i] != signs_b[i]) ? -longint'(mag[i]) : longint'(mag[i]);
        got  = longint'(signed'(tc[i]));
        checks++;
        if (got != want) failures++;
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
