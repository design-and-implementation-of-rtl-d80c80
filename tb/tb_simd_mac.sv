// tb_simd_mac: self-checking test of the four-lane multiply-accumulate unit.
//
// Loads random input offsets, accumulates random byte vectors (extremes
// included), checks acc_next in the same cycle and acc after the edge
// against a 64-bit reference, and checks clear, clear-with-accumulate and
// that acc holds when idle. The unit's throughput is one accumulation per
// cycle; the test issues them back to back and checks each result one cycle
// later.
module tb_simd_mac;
  import tb_ref_pkg::*;

  logic clk = 1'b0, reset = 1'b1;
  logic off_load = 1'b0, clear = 1'b0, acc_en = 1'b0;
  logic signed [15:0] input_offset = '0;
  logic [31:0] in_bytes = '0, filt_bytes = '0;
  logic signed [31:0] acc, acc_next;

  int checks = 0, failures = 0;
  int model, off;

  simd_mac dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic logic [31:0] rnd_word(input int k);
    case (k % 4)
      0: return 32'h8080_8080;          // all -128
      1: return 32'h7f7f_7f7f;          // all +127
      default: return $urandom;
    endcase
  endfunction

  initial begin
    model = 0;
    off   = 0;
    repeat (2) @(posedge clk);
    reset <= 1'b0;
    @(posedge clk);
    check("reset acc", acc, 0);
    for (int round = 0; round < 20; round++) begin
      // New offset, cleared accumulator.
      @(negedge clk);
      off = $urandom_range(0, 255) - 128;
      if (round == 1) off = 128;
      if (round == 2) off = -128;
      input_offset = 16'(off);
      off_load = 1'b1;
      clear    = 1'b1;
      @(posedge clk);
      #1;
      off_load = 1'b0;
      clear    = 1'b0;
      model    = 0;
      check("clear", acc, 0);
      for (int k = 0; k < 25; k++) begin
        @(negedge clk);
        in_bytes   = rnd_word($urandom);
        filt_bytes = rnd_word($urandom);
        acc_en     = 1'b1;
        model      = model + dot(in_bytes, filt_bytes, off);
        #1;
        check("acc_next", acc_next, model);
        @(posedge clk);
        #1;
        check("acc", acc, model);
      end
      @(negedge clk);
      acc_en = 1'b0;
      in_bytes = $urandom;
      repeat (3) @(posedge clk);
      #1;
      check("hold", acc, model);
    end
    // Clear and accumulate in the same cycle restart at the new product.
    @(negedge clk);
    in_bytes = 32'h0102_0304; filt_bytes = 32'hff02_fd04;
    clear = 1'b1; acc_en = 1'b1;
    @(posedge clk);
    #1;
    clear = 1'b0; acc_en = 1'b0;
    check("clear+acc", acc, dot(32'h0102_0304, 32'hff02_fd04, off));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
