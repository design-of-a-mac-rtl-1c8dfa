// tb_mx_final_adder: tests the 67-bit final adder by value.
//
// Random block sums S (|S| < 2^41, as the tree can produce, with zeros and
// small values mixed in), random fp_in significands and signs, and random
// LSB exponents for both operands (fp_in: -149..104, block: -272..234) cover
// all four window placements. The exact sum F*2^e_fp + S*2^e_s is formed in
// a 640-bit integer and the output must describe it: without sticky,
// +-res_mag * 2^e_w equals it; with sticky, |sum| lies strictly between
// res_mag and res_mag + 1 window LSBs, and the window still holds 25 result
// bits (res_mag >= 2^24) or reaches below the FP32 subnormal LSB. An exact
// zero is +0 unless the block sum is zero, when it takes fp_in's sign.
module tb_mx_final_adder;
  import mx_pkg::*;
  import mx_ref_pkg::*;

  logic [TREE_W-1:0]        sum_of_products;
  logic                     fp_sign;
  logic [23:0]              fp_sig;
  logic signed [SSUM_W-1:0] exp_diff, e_fp;
  logic                     res_sign, sticky;
  logic [ACC_W-1:0]         res_mag;
  logic signed [EW_W-1:0]   e_w;

  mx_final_adder dut (.*);

  int checks = 0, failures = 0;
  int cnt_case [4];

  localparam int OFS = 300;  // LSB of the exact sum is 2^-300

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int   ef, es, d, ex;
      longint s;
      big_t exact, lo, hi, absx;
      ex = $urandom % 255;                       // fp_in exponent field 0..254
      ef = (ex == 0 ? 1 : ex) - 150;
      case ($urandom % 4)
        0: es = ef - int'($urandom % 120);       // block well below
        1: es = ef + int'($urandom % 120);       // block well above
        2: es = ef - 30 + int'($urandom % 80);   // near
        default: es = -272 + int'($urandom % 507);
      endcase
      if (es < -272) es = -272;
      if (es > 234) es = 234;
      d = ef - es;
      case ($urandom % 6)
        0: s = 0;
        1: s = longint'($urandom % 1000) - 500;
        2: s = (longint'($urandom) << 9) ^ longint'($urandom);
        default: s = ((longint'($urandom) << 32) | longint'($urandom)) % 64'sd2000000000000;
      endcase
      if ($urandom % 2) s = -s;
      sum_of_products = TREE_W'(s);
      fp_sign  = 1'($urandom);
      fp_sig   = {ex != 0, 23'($urandom)};
      if ($urandom % 10 == 0) fp_sig = {ex != 0, 23'd0};
      if (ex == 0 && $urandom % 3 == 0) fp_sig = '0;          // zero
      e_fp     = SSUM_W'(ef);
      exp_diff = SSUM_W'(d);
      #1;
      if (s == 0 || d > 42) cnt_case[0]++;
      else if (d >= 0)      cnt_case[1]++;
      else if (d >= -25)    cnt_case[2]++;
      else                  cnt_case[3]++;

      exact = (big_t'(s) <<< (es + OFS)) +
              (fp_sign ? -(big_t'(fp_sig) <<< (ef + OFS)) : (big_t'(fp_sig) <<< (ef + OFS)));
      absx  = exact < 0 ? -exact : exact;
      lo    = big_t'(res_mag) <<< (int'(e_w) + OFS);
      hi    = big_t'(res_mag + 1) <<< (int'(e_w) + OFS);
      checks++;
      if (!sticky) begin
        if (lo != absx || (exact != 0 && res_sign != (exact < 0))) begin
          failures++;
          if (failures < 10) $display("ERROR exact: s=%0d d=%0d ef=%0d", s, d, ef);
        end
      end else begin
        if (!(lo < absx && absx < hi) || res_sign != (exact < 0) ||
            !(res_mag >= ACC_W'(1 << 24) || int'(e_w) <= -150)) begin
          failures++;
          if (failures < 10) $display("ERROR sticky: s=%0d d=%0d ef=%0d f=%0b %h mag=%h e_w=%0d sign=%0b", s, d, ef, fp_sign, fp_sig, res_mag, e_w, res_sign);
        end
      end
      checks++;
      if (res_mag[ACC_W-1]) failures++;
      if (exact == 0) begin
        checks++;
        if (res_sign != (s == 0 && fp_sign)) failures++;
      end
    end
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (cnt_case[c] == 0) begin failures++; $display("ERROR: window case %0d never used", c); end
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
