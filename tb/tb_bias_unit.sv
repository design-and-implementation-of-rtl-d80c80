// tb_bias_unit: self-checking test of the bias adder.
//
// Loads random biases (and the 32-bit extremes), checks that sum equals
// acc + bias one cycle after sum_en, that sum holds while sum_en is low and
// that a bias load does not disturb the stored sum.
module tb_bias_unit;
  logic clk = 1'b0, reset = 1'b1;
  logic bias_load = 1'b0, sum_en = 1'b0;
  logic signed [31:0] bias_in = '0, acc_in = '0, sum;

  int checks = 0, failures = 0;
  int bias, exp_sum;

  bias_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
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

  initial begin
    repeat (2) @(posedge clk);
    reset <= 1'b0;
    @(posedge clk);
    #1;
    check("reset sum", sum, 0);
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      bias      = (i == 3) ? 32'sh7fff_ffff : (i == 4) ? 32'sh8000_0000 : int'($urandom);
      bias_in   = bias;
      bias_load = 1'b1;
      @(negedge clk);
      bias_load = 1'b0;
      bias_in   = $urandom;       // must not matter now
      acc_in    = $urandom;
      exp_sum   = acc_in + bias;
      sum_en    = 1'b1;
      @(posedge clk);
      #1;
      sum_en = 1'b0;
      check("sum", sum, exp_sum);
      acc_in = $urandom;
      @(negedge clk);
      bias_in   = $urandom;
      bias_load = 1'b1;
      @(posedge clk);
      #1;
      bias_load = 1'b0;
      check("hold", sum, exp_sum);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
