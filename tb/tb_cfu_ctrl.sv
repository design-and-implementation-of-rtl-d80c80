// tb_cfu_ctrl: self-checking test of the accelerator's control unit.
//
// Drives random commands (held until accepted, as the protocol requires),
// a random response-buffer state and a random rsp_ready, and compares every
// output of the unit, every cycle, with a cycle model of the intended
// behaviour: a command is accepted only when idle and the buffer is free;
// INIT0/INIT1/ACC/unknown commands raise their enables and write the
// response buffer in the accepting cycle; READ raises the bias, quantizer
// start and clear enables, then stage1 one cycle later and the response
// write one cycle after that, blocking new commands meanwhile.
module tb_cfu_ctrl;
  import cfu_pkg::*;

  logic clk = 1'b0, reset = 1'b1;
  logic cmd_valid = 1'b0, cmd_ready;
  logic [2:0] funct3 = '0;
  logic rsp_valid = 1'b0, rsp_ready = 1'b0;
  logic mac_off_load, mac_clear, mac_acc_en, bias_load, bias_sum_en;
  logic q_off_load, q_lim_load, q_start, q_stage1_en, res_load;
  res_sel_e res_sel;

  int checks = 0, failures = 0;
  int n_read = 0, n_block = 0, n_cmd[8];
  int phase;          // 0 idle, 1 after READ accept, 2 after that

  cfu_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected outputs, packed as
  // {cmd_ready, mac_off_load, mac_clear, mac_acc_en, bias_load, bias_sum_en,
  //  q_off_load, q_lim_load, q_start, q_stage1_en, res_load, res_sel}
  function automatic logic [12:0] expect_out(input int ph, input logic v,
                                             input logic [2:0] f,
                                             input logic rv, input logic rr);
    logic rdy;
    logic [10:0] en;
    logic [1:0] sel;
    rdy = (ph == 0) && (!rv || rr);
    en  = '0;
    sel = 2'd0;
    if (ph == 1) en[1] = 1'b1;
    if (ph == 2) begin en[0] = 1'b1; sel = 2'd2; end
    if (rdy && v) begin
      case (f)
        3'd0: begin en[9] = 1; en[8] = 1; en[6] = 1; en[4] = 1; en[0] = 1; end
        3'd1: begin en[3] = 1; en[0] = 1; end
        3'd2: begin en[7] = 1; en[0] = 1; sel = 2'd1; end
        3'd3: begin en[5] = 1; en[2] = 1; en[8] = 1; end
        default: en[0] = 1;
      endcase
    end
    return {rdy, en[9:0], sel};
  endfunction

  initial begin
    logic [12:0] got, exp;
    foreach (n_cmd[i]) n_cmd[i] = 0;
    phase = 0;
    repeat (2) @(posedge clk);
    reset <= 1'b0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      if (!cmd_valid) begin
        cmd_valid = ($urandom_range(0, 3) != 0);
        funct3    = ($urandom_range(0, 9) == 0) ? 3'($urandom) : 3'($urandom_range(0, 3));
      end
      rsp_valid = ($urandom_range(0, 2) == 0);
      rsp_ready = ($urandom_range(0, 2) != 0);
      #1;
      got = {cmd_ready, mac_off_load, mac_clear, mac_acc_en, bias_load, bias_sum_en,
             q_off_load, q_lim_load, q_start, q_stage1_en, res_load, 2'(res_sel)};
      exp = expect_out(phase, cmd_valid, funct3, rsp_valid, rsp_ready);
      checks++;
      if (got !== exp) begin
        failures++;
        $display("FAIL cycle %0d phase %0d cmd %0d: got %b expected %b",
                 i, phase, funct3, got, exp);
      end
      if (cmd_valid && !exp[12]) n_block++;
      @(posedge clk);
      if (phase == 1) phase = 2;
      else if (phase == 2) phase = 0;
      else if (cmd_valid && exp[12]) begin
        n_cmd[funct3]++;
        if (funct3 == 3'd3) begin phase = 1; n_read++; end
        #1 cmd_valid = 1'b0;
      end
    end
    checks++;
    if (n_read == 0 || n_block == 0 || n_cmd[0] == 0 || n_cmd[1] == 0 || n_cmd[2] == 0 ||
        n_cmd[5] + n_cmd[6] + n_cmd[7] + n_cmd[4] == 0) begin
      failures++;
      $display("FAIL coverage");
    end
    $display("commands: init0 %0d init1 %0d acc %0d read %0d, blocked cycles %0d",
             n_cmd[0], n_cmd[1], n_cmd[2], n_cmd[3], n_block);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
