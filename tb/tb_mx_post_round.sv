// tb_mx_post_round: tests round to nearest, ties to even, of bits 66..43.
// The 43 bits below the kept significand plus the sticky input are compared
// with one half LSB: above rounds up, below truncates, an exact tie rounds
// to the even neighbour. Random vectors plus forced ties, near-ties and
// all-ones significands (carry out) are used.
module tb_mx_post_round;
  import mx_pkg::*;

  logic [ACC_W-1:0] norm;
  logic             sticky_in, hidden, carry;
  logic [22:0]      frac;

  mx_post_round dut (.*);

  int checks = 0, failures = 0, n_carry = 0, n_tie = 0;

  initial begin
    for (int n = 0; n < 20000; n++) begin
      logic [23:0] sig;
      logic [42:0] rem;
      logic        up;
      longint      want;
      sig = 24'($urandom);
      rem = {11'($urandom), 32'($urandom)};
      sticky_in = 1'($urandom);
      case (n % 5)
        0: begin rem = 43'h400_0000_0000; sticky_in = 1'b0; end           // tie
        1: rem = 43'h3FF_FFFF_FFFF;                                       // just below half
        2: sig = 24'hFF_FFFF;
        default: ;
      endcase
      norm = {sig, rem};
      #1;
      if (rem > 43'h400_0000_0000)                     up = 1'b1;
      else if (rem < 43'h400_0000_0000)                up = 1'b0;
      else if (sticky_in)                              up = 1'b1;
      else begin                                       up = sig[0]; n_tie++; end
      want = longint'(sig) + longint'(up);
      if (want == 64'd1 << 24) n_carry++;
      checks++;
      if ({carry, hidden, frac} != 25'(want)) begin
        failures++;
        if (failures < 10) $display("ERROR: sig %h rem %h st %0b", sig, rem, sticky_in);
      end
    end
    checks += 2;
    if (n_carry == 0 || n_tie == 0) failures++;
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
