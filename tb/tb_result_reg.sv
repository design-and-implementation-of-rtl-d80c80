// tb_result_reg: self-checking test of the response buffer.
//
// Drives loads only when the buffer is empty or being emptied (the unit's
// rule) and a random ready, and checks valid and data cycle by cycle against
// a one-entry model: a loaded word is presented from the next cycle and
// held, unchanged, until a cycle with ready.
module tb_result_reg;
  logic clk = 1'b0, reset = 1'b1;
  logic load = 1'b0, ready = 1'b0, valid;
  logic [31:0] d = '0, q;

  int checks = 0, failures = 0;
  int held = 0, back_to_back = 0;
  logic        m_valid;
  logic [31:0] m_q;

  result_reg dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m_valid = 1'b0;
    m_q     = '0;
    repeat (2) @(posedge clk);
    reset <= 1'b0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++;
      if (valid !== m_valid || (m_valid && q !== m_q)) begin
        failures++;
        $display("FAIL cycle %0d: valid %0b q %h, expected %0b %h", i, valid, q, m_valid, m_q);
      end
      ready = ($urandom_range(0, 2) != 0);
      load  = ($urandom_range(0, 1) != 0) && (!m_valid || ready);
      d     = $urandom;
      if (m_valid && !ready) held++;
      if (load && m_valid && ready) back_to_back++;
      @(posedge clk);
      if (load) begin
        m_valid = 1'b1;
        m_q     = d;
      end else if (ready) m_valid = 1'b0;
    end
    checks++;
    if (held == 0 || back_to_back == 0) begin
      failures++;
      $display("FAIL: hold (%0d) or back-to-back (%0d) case never seen", held, back_to_back);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
