// tb_mx_input_proc: exhaustive test of the element decoder.
//
// For every format and every 8-bit slot value, the decoded
// sign * sig * 2^(exp - 9) must equal the element value computed from the
// format definition (bias, hidden bit, subnormals) in mx_ref_pkg, and the NaN
// flag must be raised exactly for the E4M3 NaN code and for reserved formats.
module tb_mx_input_proc;
  import mx_pkg::*;
  import mx_ref_pkg::*;

  logic [2:0]                  fmt;
  logic [N_ELEM-1:0][7:0]      elems;
  logic [N_ELEM-1:0]           signs;
  logic [N_ELEM-1:0][EXP_W-1:0] exps;
  logic [N_ELEM-1:0][SIG_W-1:0] sigs;
  logic                        nan;

  mx_input_proc dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int f = 0; f < 8; f++) begin
      for (int base = 0; base < 256; base += N_ELEM) begin
        bit any_nan;
        any_nan = 1'b0;
        fmt = 3'(f);
        for (int i = 0; i < N_ELEM; i++) elems[i] = 8'(base + i);
        #1;
        if (f <= 3) begin
          for (int i = 0; i < N_ELEM; i++) begin
            big_t got, want;
            if (elem_is_nan(f, elems[i])) begin any_nan = 1'b1; continue; end
            want = elem_val(f, elems[i]);
            got  = big_t'(sigs[i]) <<< (int'(exps[i]) + 3);   // value * 2^12
            if (signs[i]) got = -got;
            checks++;
            // a zero's sign does not matter
            if (got != want) begin
              failures++;
              $display("ERROR fmt %0d x %02h: sign %0b exp %0d sig %0d", f, elems[i], signs[i], exps[i], sigs[i]);
            end
            checks++;
            if (want != 0 && signs[i] != (want < 0)) failures++;
          end
        end
        checks++;
        if (nan != (any_nan || f > 3)) begin
          failures++;
          $display("ERROR nan flag fmt %0d base %0d: %0b", f, base, nan);
        end
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
