// tb_fomo_cfu: end-to-end test of the accelerator, as the CPU would use it.
//
// A command queue feeds the command channel (each command held until
// accepted) and the responses are collected in order and compared with a
// reference computed in the testbench from the same random data. Two int8
// layers are run at the unit's default configuration:
//   1. a standard 3x3 convolution, 8 input channels, 4 output channels,
//      4x4 outputs, computed as the nested loops of the reference software:
//      per output channel INIT0 (offsets, bias) and INIT1 (limits), then per
//      output pixel 18 ACC commands (two per filter tap, four channels each)
//      and one READ; the READ clears the accumulator for the next pixel.
//      rsp_ready is held high, so commands stream one per cycle.
//   2. a 3x3 depthwise convolution over 4 channels, the nine taps of a
//      channel packed in three ACC words (zero filter bytes as padding),
//      with INIT0/INIT1 before each output and a random rsp_ready.
// Then a command with an unused funct3 must be answered with zero.
// Every response is checked, and so is the latency from acceptance to
// rsp_valid (one cycle, three for READ). The test counts, and requires at
// least once: command stalls, responses held by rsp_ready, commands accepted
// in consecutive cycles, READ-cleared accumulators, clamping at each limit,
// right and left output shifts and the unknown-command reply.
module tb_fomo_cfu;
  import cfu_pkg::*;
  import tb_ref_pkg::*;

  logic        clk = 1'b0, reset = 1'b1;
  logic        cmd_valid = 1'b0, cmd_ready;
  logic [9:0]  cmd_payload_function_id = '0;
  logic [31:0] cmd_payload_inputs_0 = '0, cmd_payload_inputs_1 = '0;
  logic        rsp_valid, rsp_ready = 1'b0;
  logic [31:0] rsp_payload_outputs_0;

  fomo_cfu dut (.*);

  always #5 clk = ~clk;

  typedef struct {
    logic [2:0]  f;
    logic [31:0] a, b;
    logic [31:0] exp;
  } op_t;

  op_t cmd_q[$];
  op_t exp_q[$];
  int  lat_q[$];           // expected latency of each accepted command

  int checks = 0, failures = 0;
  int cycle = 0;
  int n_stall = 0, n_hold = 0, n_b2b = 0, n_rdclr = 0, n_lo = 0, n_hi = 0;
  int n_rshift = 0, n_lshift = 0, n_unknown = 0;
  int outstanding = 0, received = 0;
  int ready_mode = 1;      // 1: always ready, 0: random
  int last_fire = -10;
  int fire_cycle[$];

  initial begin
    repeat (200000) @(posedge clk);
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

  // ---- command channel -------------------------------------------------
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!reset && cmd_valid && !cmd_ready) n_stall++;
    if (!reset && rsp_valid && !rsp_ready) n_hold++;
    if (!reset && cmd_valid && cmd_ready) begin
      if (last_fire == cycle - 1) n_b2b++;
      last_fire = cycle;
      fire_cycle.push_back(cycle);
      void'(cmd_q.pop_front());
    end
  end

  always @(negedge clk) begin
    if (!reset && cmd_q.size() > 0) begin
      cmd_valid               = 1'b1;
      cmd_payload_function_id = {7'd0, cmd_q[0].f};
      cmd_payload_inputs_0    = cmd_q[0].a;
      cmd_payload_inputs_1    = cmd_q[0].b;
    end else begin
      cmd_valid               = 1'b0;
      cmd_payload_inputs_0    = $urandom;
      cmd_payload_inputs_1    = $urandom;
    end
    rsp_ready = (ready_mode == 1) ? 1'b1 : ($urandom_range(0, 2) == 0);
  end

  // ---- response channel ------------------------------------------------
  logic prev_new;
  logic prev_valid = 1'b0, prev_taken = 1'b0;
  always @(posedge clk) begin
    if (!reset) begin
      // First cycle of a new response: check its latency.
      if (rsp_valid && (!prev_valid || prev_taken)) begin
        int fc, lat;
        fc  = fire_cycle.pop_front();
        lat = lat_q.pop_front();
        check("latency", cycle - fc, lat);
      end
      if (rsp_valid && rsp_ready) begin
        op_t e;
        e = exp_q.pop_front();
        check($sformatf("response to funct3 %0d", e.f), rsp_payload_outputs_0, e.exp);
        received++;
      end
      prev_valid <= rsp_valid;
      prev_taken <= rsp_valid && rsp_ready;
    end
  end

  task automatic push(input logic [2:0] f, input logic [31:0] a, input logic [31:0] b,
                      input logic [31:0] exp);
    op_t o;
    o.f = f; o.a = a; o.b = b; o.exp = exp;
    cmd_q.push_back(o);
    exp_q.push_back(o);
    lat_q.push_back((f == 3'd3) ? 3 : 1);
    outstanding++;
  endtask

  // ---- layer data ------------------------------------------------------
  localparam int C = 8, Z = 4, D = 3, X = 4, Y = 4;
  byte img  [X+D-1][Y+D-1][C];
  byte wts  [Z][D][D][C];
  byte dwk  [Z][D][D];
  int  bias [Z], mult [Z], shft [Z];

  function automatic logic [31:0] pack4(input byte b0, input byte b1, input byte b2,
                                        input byte b3);
    return {b3, b2, b1, b0};
  endfunction

  initial begin
    int in_off, out_off, lo, hi, acc, r, s;
    repeat (3) @(posedge clk);
    reset = 1'b0;

    // ---- layer 1: standard convolution --------------------------------
    in_off = 77; out_off = -5; lo = -128; hi = 127;
    foreach (img[i, j, c]) img[i][j][c] = byte'($urandom);
    foreach (wts[z, h, w, c]) wts[z][h][w][c] = byte'($urandom);
    for (int z = 0; z < Z; z++) begin
      bias[z] = int'($urandom_range(0, 20000)) - 10000;
      mult[z] = int'($urandom_range(32'h4000_0000, 32'h7fff_ffff));
      shft[z] = (z == 3) ? 1 : -int'($urandom_range(9, 11));
    end
    ready_mode = 1;
    for (int z = 0; z < Z; z++) begin
      push(3'd0, {16'(out_off), 16'(in_off)}, bias[z], 0);
      push(3'd1, lo, hi, 0);
      for (int x = 0; x < X; x++)
        for (int y = 0; y < Y; y++) begin
          acc = 0;
          for (int h = 0; h < D; h++)
            for (int w = 0; w < D; w++)
              for (int c = 0; c < C; c += 4) begin
                logic [31:0] iv, wv;
                iv  = pack4(img[x+h][y+w][c], img[x+h][y+w][c+1],
                            img[x+h][y+w][c+2], img[x+h][y+w][c+3]);
                wv  = pack4(wts[z][h][w][c], wts[z][h][w][c+1],
                            wts[z][h][w][c+2], wts[z][h][w][c+3]);
                acc += dot(iv, wv, in_off);
                push(3'd2, iv, wv, acc);
              end
          r = quantize(acc + bias[z], mult[z], shft[z], out_off, lo, hi);
          s = quantize(acc + bias[z], mult[z], shft[z], out_off, 32'sh8000_0000, 32'sh7fff_ffff);
          if (s < lo) n_lo++;
          if (s > hi) n_hi++;
          if (shft[z] < 0) n_rshift++;
          if (shft[z] > 0) n_lshift++;
          push(3'd3, mult[z], shft[z], r);
          // Next pixel without INIT0: the READ must have cleared the sum.
          if (!(x == 0 && y == 0)) n_rdclr++;
        end
    end
    wait (cmd_q.size() == 0);
    wait (received == outstanding);

    // ---- layer 2: depthwise convolution -------------------------------
    ready_mode = 0;
    in_off = 128; out_off = 3; lo = -100; hi = 90;
    foreach (dwk[z, h, w]) dwk[z][h][w] = byte'($urandom);
    for (int z = 0; z < Z; z++) begin
      bias[z] = int'($urandom_range(0, 4000)) - 2000;
      mult[z] = int'($urandom_range(32'h4000_0000, 32'h7fff_ffff));
      shft[z] = -int'($urandom_range(6, 9));
    end
    for (int x = 0; x < X; x++)
      for (int y = 0; y < Y; y++)
        for (int z = 0; z < Z; z++) begin
          byte tin[12], tw[12];
          push(3'd0, {16'(out_off), 16'(in_off)}, bias[z], 0);
          push(3'd1, lo, hi, 0);
          for (int t = 0; t < 12; t++) begin
            tin[t] = (t < 9) ? img[x + t/3][y + t%3][z] : byte'($urandom);
            tw[t]  = (t < 9) ? dwk[z][t/3][t%3] : 8'sd0;
          end
          acc = 0;
          for (int k = 0; k < 3; k++) begin
            logic [31:0] iv, wv;
            iv = pack4(tin[4*k], tin[4*k+1], tin[4*k+2], tin[4*k+3]);
            wv = pack4(tw[4*k], tw[4*k+1], tw[4*k+2], tw[4*k+3]);
            acc += dot(iv, wv, in_off);
            push(3'd2, iv, wv, acc);
          end
          r = quantize(acc + bias[z], mult[z], shft[z], out_off, lo, hi);
          s = quantize(acc + bias[z], mult[z], shft[z], out_off, 32'sh8000_0000, 32'sh7fff_ffff);
          if (s < lo) n_lo++;
          if (s > hi) n_hi++;
          n_rshift++;
          push(3'd3, mult[z], shft[z], r);
        end

    // ---- unknown command ------------------------------------------------
    push(3'd6, $urandom, $urandom, 0);
    n_unknown++;
    wait (cmd_q.size() == 0);
    wait (received == outstanding);
    repeat (5) @(posedge clk);

    check("all responses received", received, outstanding);
    check("no stray latency records", fire_cycle.size(), 0);
    $display("mechanisms: stall %0d rsp-hold %0d back-to-back %0d read-clear %0d clamp-low %0d clamp-high %0d right-shift %0d left-shift %0d unknown-cmd %0d",
             n_stall, n_hold, n_b2b, n_rdclr, n_lo, n_hi, n_rshift, n_lshift, n_unknown);
    if (n_stall == 0)   begin failures++; $display("FAIL: no command stall"); end
    if (n_hold == 0)    begin failures++; $display("FAIL: no response hold"); end
    if (n_b2b == 0)     begin failures++; $display("FAIL: no back-to-back commands"); end
    if (n_rdclr == 0)   begin failures++; $display("FAIL: no read-cleared accumulator"); end
    if (n_lo == 0)      begin failures++; $display("FAIL: no clamp at the minimum"); end
    if (n_hi == 0)      begin failures++; $display("FAIL: no clamp at the maximum"); end
    if (n_rshift == 0)  begin failures++; $display("FAIL: no right shift"); end
    if (n_lshift == 0)  begin failures++; $display("FAIL: no left shift"); end
    if (n_unknown == 0) begin failures++; $display("FAIL: no unknown command"); end
    checks += 9;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
