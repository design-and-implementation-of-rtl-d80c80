// tb_quantizer: self-checking test of the requantization unit.
//
// For each vector: the limits and output offset are loaded, then start
// captures multiplier and shift with the sum applied, stage1_en follows one
// cycle later and out is checked in the cycle after that (the unit's
// two-cycle latency) against tb_ref_pkg::quantize. Vectors mix typical int8
// layer settings (multiplier in [2^30, 2^31), shift -12..+3, limits
// -128..127) with extremes; the test counts and requires the saturating
// multiply, both shift directions, exact rounding ties and clamping at both
// limits.
module tb_quantizer;
  import tb_ref_pkg::*;

  logic clk = 1'b0, reset = 1'b1;
  logic off_load = 1'b0, lim_load = 1'b0, start = 1'b0, stage1_en = 1'b0;
  logic signed [15:0] output_offset = '0;
  logic signed [31:0] act_min = '0, act_max = '0, multiplier = '0, shift = '0, sum = '0;
  logic signed [31:0] out;

  int checks = 0, failures = 0;
  int n_sat = 0, n_left = 0, n_right = 0, n_lo = 0, n_hi = 0, n_tie = 0;

  quantizer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int s, input int m, input int sh, input int off,
                     input int lo, input int hi);
    int exp, raw;
    @(negedge clk);
    output_offset = 16'(off);
    act_min = lo; act_max = hi;
    off_load = 1'b1; lim_load = 1'b1;
    @(negedge clk);
    off_load = 1'b0; lim_load = 1'b0;
    output_offset = $urandom; act_min = $urandom; act_max = $urandom;
    sum = s; multiplier = m; shift = sh; start = 1'b1;
    @(negedge clk);
    start = 1'b0; multiplier = $urandom; shift = $urandom;
    stage1_en = 1'b1;
    @(negedge clk);
    stage1_en = 1'b0;
    exp = quantize(s, m, sh, off, lo, hi);
    raw = quantize(s, m, sh, off, 32'sh8000_0000, 32'sh7fff_ffff);
    checks++;
    if (out !== exp) begin
      failures++;
      $display("FAIL sum=%0d mult=%0d shift=%0d off=%0d [%0d,%0d]: got %0d expected %0d",
               s, m, sh, off, lo, hi, out, exp);
    end
    if (s == 32'sh8000_0000 && m == 32'sh8000_0000 && sh == 0) n_sat++;
    if (sh > 0) n_left++;
    if (sh < 0) n_right++;
    if (raw < lo) n_lo++;
    if (raw > hi) n_hi++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    reset <= 1'b0;
    // Saturating multiply.
    run(32'sh8000_0000, 32'sh8000_0000, 0, 0, 32'sh8000_0000, 32'sh7fff_ffff);
    // Exact ties: product = +-2^30 and +-2^31 * 1.5 with multiplier 2^30.
    run(1, 32'sh4000_0000, 0, 0, -1000, 1000);
    run(-1, 32'sh4000_0000, 0, 0, -1000, 1000);
    run(3, 32'sh4000_0000, 0, 0, -1000, 1000);
    run(-3, 32'sh4000_0000, 0, 0, -1000, 1000);
    // Exact ties in the rounding right shift.
    run(12, 32'sh7fff_ffff, -3, 0, -1000, 1000);
    run(-12, 32'sh4000_0000, -2, 0, -1000, 1000);
    run(20, 32'sh4000_0000, -2, 0, -1000, 1000);
    run(-20, 32'sh4000_0000, -2, 0, -1000, 1000);
    n_tie = 8;
    // Large shifts both ways.
    run(32'sh7fff_0000, 32'sh7fff_ffff, -31, 5, 32'sh8000_0000, 32'sh7fff_ffff);
    run(3, 32'sh5000_0000, 31, 0, 32'sh8000_0000, 32'sh7fff_ffff);
    for (int i = 0; i < 3000; i++) begin
      int s, m, sh, off;
      s   = (i % 3 == 0) ? int'($urandom) : int'($urandom_range(0, 400000)) - 200000;
      m   = (i % 5 == 0) ? int'($urandom) : int'($urandom_range(32'h4000_0000, 32'h7fff_ffff));
      sh  = int'($urandom_range(0, 15)) - 12;
      off = int'($urandom_range(0, 255)) - 128;
      if (i % 2 == 0) run(s, m, sh, off, -128, 127);
      else            run(s, m, sh, off, int'($urandom_range(0, 100)) - 120,
                                         int'($urandom_range(0, 100)) + 20);
    end
    // Unshifted results over the full int32 range expose the multiply's
    // rounding directly.
    for (int i = 0; i < 500; i++)
      run(int'($urandom_range(0, 2000000)) - 1000000, int'($urandom), 0,
          int'($urandom_range(0, 255)) - 128, 32'sh8000_0000, 32'sh7fff_ffff);
    checks++;
    if (n_sat == 0 || n_left == 0 || n_right == 0 || n_lo == 0 || n_hi == 0 || n_tie == 0) begin
      failures++;
      $display("FAIL coverage: sat %0d left %0d right %0d lo %0d hi %0d",
               n_sat, n_left, n_right, n_lo, n_hi);
    end
    $display("coverage: saturate %0d left-shift %0d right-shift %0d clamp-low %0d clamp-high %0d",
             n_sat, n_left, n_right, n_lo, n_hi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
