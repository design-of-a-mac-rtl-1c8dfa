// tb_mx_mac: end-to-end test of the MX MAC at its default (full) size.
//
// Streams operations into the 4-stage pipeline, one per clock where possible,
// and checks every result bit-exactly against the wide-integer reference in
// mx_ref_pkg, together with the latency (out_valid exactly 4 clocks after
// in_valid) and the order of results. Stimulus is steered so that every
// mechanism of the datapath occurs: all four element formats and the three
// mixed-precision pairs, all four ways
// the final adder lines fp_in up with the block sum, a zero block sum,
// NaN inputs, infinity pass-through, overflow to infinity, subnormal
// results, deep cancellation against fp_in, pipeline bubbles, and
// accumulation chains that feed fp_out back into fp_in (five interleaved
// accumulators keep the pipeline busy). Each mechanism's count is printed;
// one that never happened counts as a failure.
module tb_mx_mac;
  import mx_ref_pkg::*;

  localparam int LAT      = 4;
  localparam int N_RANDOM = 20000;
  localparam int N_CHAINS = 5;
  localparam int CHAIN_LEN = 200;

  logic        clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [31:0] fp_in = '0;
  logic [7:0]  scale_a = '0, scale_b = '0;
  logic [31:0][7:0] elems_a = '0, elems_b = '0;
  logic [2:0]  mode = '0;
  logic        out_valid;
  logic [31:0] fp_out;

  mx_mac dut (.*);

  always #2 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;

  typedef struct { logic [31:0] exp; longint issued; int tag; } exp_t;
  exp_t q[$];

  // mechanism counters
  typedef enum int { M_E4M3, M_E3M2, M_E2M3, M_E2M1, M_E4M3_E3M2, M_E4M3_E2M3,
                     M_E4M3_E2M1, M_D_BIG, M_D_MID, M_D_NEG,
                     M_D_FAR, M_S_ZERO, M_NAN, M_INF, M_OVF, M_SUBN, M_CANCEL,
                     M_BACK2BACK, M_BUBBLE, M_CHAIN, M_NUM } mech_e;
  int mech [M_NUM];
  string mech_name [M_NUM] = '{"format E4M3", "format E3M2", "format E2M3", "format E2M1",
                               "mixed E4M3 x E3M2", "mixed E4M3 x E2M3", "mixed E4M3 x E2M1",
                               "fp_in far above block (d>42)", "fp_in above block (0<=d<=42)",
                               "fp_in slightly below block (-25<=d<0)", "fp_in far below block (d<-25)",
                               "zero block sum", "NaN result", "infinity pass-through",
                               "overflow to infinity", "subnormal result", "cancellation",
                               "back-to-back issue", "pipeline bubble", "accumulation chain step"};

  logic [31:0] acc_val [N_CHAINS];
  bit          acc_ready [N_CHAINS];
  logic        prev_valid = 1'b0;

  // ---------------------------------------------------------------- monitor
  // cycle counts rising edges; results are sampled at the falling edge
  always @(posedge clk) cycle <= cycle + 1;

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("ERROR: unexpected out_valid at cycle %0d", cycle);
      end else begin
        e = q.pop_front();
        if (cycle - e.issued != longint'(LAT)) begin
          failures++;
          $display("ERROR: latency %0d, expected %0d", cycle - e.issued, LAT);
        end
        checks++;
        if (fp_out !== e.exp) begin
          failures++;
          if (failures < 20)
            $display("ERROR: fp_out %08h expected %08h (issued cycle %0d)", fp_out, e.exp, e.issued);
        end
        if (e.tag >= 0) begin
          acc_val[e.tag]   = fp_out;
          acc_ready[e.tag] = 1'b1;
        end
      end
    end
  end

  // --------------------------------------------------------------- stimulus
  function automatic logic [7:0] rand_elem(int fmt, bit allow_nan);
    logic [7:0] x = 8'($urandom);
    if (fmt > 3) return x;  // reserved mode: slots unused
    if (fmt != 0) x = x & ((fmt == 3) ? 8'h0F : 8'h3F);
    if (!allow_nan && fmt == 0 && x[6:0] == 7'h7F) x[0] = 1'b0;
    return x;
  endfunction

  // classify and issue one operation (drives inputs for the next edge)
  task automatic issue(input logic [31:0] f, input logic [7:0] sa, input logic [7:0] sb,
                       input logic [255:0] ea, input logic [255:0] eb, input int md, input int tag);
    exp_t e;
    big_t s;
    int   ef, d, fa, fb;
    fp_in = f; scale_a = sa; scale_b = sb; elems_a = ea; elems_b = eb; mode = 3'(md);
    in_valid = 1'b1;
    e.exp    = mac(f, sa, sb, ea, eb, md);
    e.issued = cycle;  // taken by rising edge cycle + 1
    e.tag    = tag;
    q.push_back(e);
    if (md <= 6) mech[md]++;
    if (prev_valid) mech[M_BACK2BACK]++;
    if (tag >= 0) mech[M_CHAIN]++;
    // operating regime, worked out from the operands
    if (e.exp == 32'h7FC0_0000) mech[M_NAN]++;
    else if (f[30:23] == 8'hFF) mech[M_INF]++;
    else begin
      s = '0;
      mode_fmts(md, fa, fb);
      for (int i = 0; i < 32; i++) s += elem_val(fa, ea[8*i +: 8]) * elem_val(fb, eb[8*i +: 8]);
      ef = (f[30:23] == 0) ? 1 : int'(f[30:23]);
      d  = (ef - 150) - (int'(sa) + int'(sb) - 254 - 18);
      if (s == 0)        mech[M_S_ZERO]++;
      else if (d > 42)   mech[M_D_BIG]++;
      else if (d >= 0)   mech[M_D_MID]++;
      else if (d >= -25) mech[M_D_NEG]++;
      else               mech[M_D_FAR]++;
      if (e.exp[30:0] == {8'hFF, 23'd0}) mech[M_OVF]++;
      if (e.exp[30:23] == 0 && e.exp[22:0] != 0) mech[M_SUBN]++;
    end
  endtask

  task automatic random_op(input int tag, input logic [31:0] f_chain);
    int          md, kind, fkind, base, fa, fb;
    logic [7:0]  sa, sb;
    logic [255:0] ea, eb;
    logic [31:0] f;
    bit          nan_ok;
    kind   = $urandom % 20;
    md     = (kind == 0) ? 7 : $urandom % 7;
    nan_ok = (kind == 1);
    mode_fmts(md, fa, fb);
    for (int i = 0; i < 32; i++) begin
      ea[8*i +: 8] = rand_elem(fa, nan_ok);
      eb[8*i +: 8] = rand_elem(fb, nan_ok);
      if (kind == 2 || ($urandom % 8 == 0)) ea[8*i +: 8] = 8'h00;  // sparse / zero block
    end
    // scales: around 1.0, very large, very small, NaN
    case ($urandom % 10)
      0:       begin sa = 8'(235 + $urandom % 20); sb = 8'(235 + $urandom % 20); end
      1:       begin sa = 8'($urandom % 40);       sb = 8'(60 + $urandom % 40);  end
      2:       begin sa = 8'($urandom % 256);      sb = 8'($urandom % 256);      end
      default: begin sa = 8'(117 + $urandom % 20); sb = 8'(117 + $urandom % 20); end
    endcase
    if (kind == 3) sa = 8'hFF;
    // fp_in: exponent placed relative to the block
    base  = int'(sa) + int'(sb) - 254 - 18 + 150;  // fp_in biased exp with d = 0
    fkind = $urandom % 12;
    f = {1'($urandom), 8'd0, 23'($urandom)};
    case (fkind)
      0: f[30:0] = '0;                                              // zero
      1: ;                                                          // subnormal
      2: f[30:23] = 8'hFF;                                          // inf or NaN
      3: f[30:0] = {8'hFF, 23'd0};                                  // inf
      default: begin
        int ex = base + int'($urandom % 140) - 70;
        if (ex < 1) ex = 1;
        if (ex > 254) ex = 254;
        f[30:23] = 8'(ex);
      end
    endcase
    if (kind == 4) begin  // cancel the block sum almost exactly
      logic [31:0] r0 = mac(32'h0, sa, sb, ea, eb, md);
      if (r0[30:23] != 8'hFF) begin f = r0 ^ 32'h8000_0000; mech[M_CANCEL]++; end
    end
    if (tag >= 0) f = f_chain;
    issue(f, sa, sb, ea, eb, md, tag);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // phase 1: random operations, mostly back to back, some bubbles
    for (int n = 0; n < N_RANDOM; n++) begin
      @(negedge clk); #1;
      if ($urandom % 16 == 0) begin
        in_valid = 1'b0; prev_valid = 1'b0; mech[M_BUBBLE]++;
        fp_in = 32'($urandom); elems_a = {8{32'($urandom)}};  // ignored inputs
      end else begin
        random_op(-1, '0);
        prev_valid = 1'b1;
      end
    end
    // phase 2: interleaved accumulation chains fed back from fp_out
    for (int j = 0; j < N_CHAINS; j++) begin acc_val[j] = '0; acc_ready[j] = 1'b1; end
    for (int n = 0; n < N_CHAINS * CHAIN_LEN; ) begin
      int j;
      @(negedge clk); #1;
      j = -1;
      for (int k = 0; k < N_CHAINS; k++) if (acc_ready[k] && j < 0) j = k;
      if (j < 0) begin in_valid = 1'b0; prev_valid = 1'b0; mech[M_BUBBLE]++; end
      else begin
        acc_ready[j] = 1'b0;
        random_op(j, acc_val[j]);
        prev_valid = 1'b1;
        n++;
      end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("ERROR: %0d results missing", q.size()); end
    for (int m = 0; m < M_NUM; m++) begin
      $display("mechanism %-40s : %0d", mech_name[m], mech[m]);
      checks++;
      if (mech[m] == 0) begin failures++; $display("ERROR: mechanism never exercised: %s", mech_name[m]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
