// tb_mx_align: tests the 36-bit product aligner.
// Every 8-bit product value is shifted by every exponent sum 0..28 (the
// range the exponent adders produce); the result must equal
// product * 2^shift as a 64-bit integer, so no bit may be lost.
module tb_mx_align;
  import mx_pkg::*;

  logic [N_ELEM-1:0][PROD_W-1:0]  prods;
  logic [N_ELEM-1:0][PEXP_W-1:0]  shifts;
  logic [N_ELEM-1:0][ALIGN_W-1:0] aligned;

  mx_align dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int p = 0; p < 256; p++)
      for (int s = 0; s <= 28; s++) begin
        for (int i = 0; i < N_ELEM; i++) begin
          prods[i]  = 8'((p + 7 * i) % 256);
          shifts[i] = 5'((s + i) % 29);
        end
        #1;
        for (int i = 0; i < N_ELEM; i++) begin
          longint want;
          want = longint'((p + 7 * i) % 256) * (64'd1 << ((s + i) % 29));
          checks++;
          if (longint'(aligned[i]) != want) failures++;
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
