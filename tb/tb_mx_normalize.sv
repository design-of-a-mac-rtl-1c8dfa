// tb_mx_normalize: tests leading-zero normalisation with the subnormal
// limit. Magnitudes with random leading-zero counts (and zero) and window
// exponents from -191 to +300 are applied. A result in the FP32 normal range
// must come out with its leading one in bit 66; a smaller one must be
// shifted exactly so that the 2^-149 bit lands in bit 43. In both cases no
// set bit may be shifted out.
module tb_mx_normalize;
  import mx_pkg::*;

  logic [ACC_W-1:0]       mag, norm;
  logic signed [EW_W-1:0] e_w;
  logic [SH_W-1:0]        shamt;

  mx_normalize dut (.*);

  int checks = 0, failures = 0, n_sub = 0, n_norm = 0;

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int k, ew, want;
      logic [ACC_W-1:0] m;
      m  = {3'($urandom), 32'($urandom), 32'($urandom)};
      m[ACC_W-1] = 1'b0;
      m  = m >> ($urandom % 68);
      mag = m;
      ew  = -191 + int'($urandom % 492);
      if (n % 3 == 0) ew = -191 + int'($urandom % 80);
      e_w = EW_W'(ew);
      #1;
      k = -1;
      for (int i = ACC_W - 1; i >= 0 && k < 0; i--) if (m[i]) k = i;
      if (k < 0)                    want = -1;          // zero: no set bit to place
      else if (k + ew + 127 >= 1) begin want = 66 - k; n_norm++; end
      else begin                    want = 192 + ew;    n_sub++; end
      checks++;
      if (k >= 0 && (int'(shamt) != want || norm != (m << want))) begin
        failures++;
        if (failures < 10) $display("ERROR: mag %h e_w %0d shamt %0d want %0d", m, ew, shamt, want);
      end
      if (k < 0 && norm != '0) failures++;
    end
    checks += 2;
    if (n_sub == 0 || n_norm == 0) failures++;
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
