// tb_mx_exp_update: tests the result exponent. For a normal result the
// leading one sits at window bit 66 - shamt, i.e. at 2^(e_w + 66 - shamt),
// so the field is that power plus the FP32 bias of 127, plus one on a
// rounding carry; a field of 255 or more must flag overflow. Subnormal
// results give 0, or 1 when rounding reached 2^-126. Random cases plus the
// boundaries 254/255 and 1 are applied.
module tb_mx_exp_update;
  import mx_pkg::*;

  logic signed [EW_W-1:0] e_w;
  logic [SH_W-1:0]        shamt;
  logic                   norm_msb, hidden, carry, overflow;
  logic [7:0]             exp_out;

  mx_exp_update dut (.*);

  int checks = 0, failures = 0, n_ovf = 0;

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int ew, sh, want;
      bit wovf;
      sh = $urandom % 67;
      ew = -191 + int'($urandom % 492);
      if (n % 4 == 0) ew = 62 + sh - int'($urandom % 3);   // near 254 / 255
      norm_msb = 1'($urandom);
      hidden   = norm_msb ? 1'($urandom) : 1'($urandom);
      carry    = norm_msb ? 1'($urandom) : 1'b0;
      if (norm_msb) sh = (sh > 192 + ew) ? 192 + ew : sh;  // never past the subnormal limit
      if (sh < 0) sh = 0;
      e_w = EW_W'(ew); shamt = SH_W'(sh);
      #1;
      if (norm_msb) want = (ew + 66 - sh) + 127 + int'(carry);
      else          want = int'(hidden);
      wovf = want >= 255;
      if (wovf) n_ovf++;
      checks++;
      if (overflow != wovf || (!wovf && int'(exp_out) != want)) begin
        failures++;
        if (failures < 10) $display("ERROR: e_w %0d sh %0d msb %0b c %0b -> %0d", ew, sh, norm_msb, carry, exp_out);
      end
    end
    checks++;
    if (n_ovf == 0) failures++;
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
