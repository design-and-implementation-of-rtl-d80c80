// tb_fomo_layer0: the first convolution of the FOMO detector on a full frame.
//
// Runs the network's input layer through the accelerator at its default
// configuration: a 96x96 single-channel (grayscale) int8 frame, a 3x3
// convolution with stride 2 and "same" padding (one zero-point row/column
// after the last), 16 output channels, giving a 48x48x16 output. The layer
// shape is that of the FOMO network's MobileNetV2 (width 0.35) trunk; the
// image and weights are random, since only the arithmetic is under test.
// Padding is applied by the software, as the network's pad layers do: a pad
// byte equals the input zero point, so it adds nothing to the sum.
//
// For each output channel the driver sends INIT0 and INIT1 once; for each
// output pixel it sends three ACC commands (the nine taps packed four per
// word, unused filter bytes zero) and a READ, whose result is compared with a
// reference convolution computed directly from the frame. Every response
// is checked; the READ must clear the accumulator between pixels. The test
// also reports how many clock cycles the unit needed for the whole layer
// with an always-ready CPU issuing one command per cycle.
module tb_fomo_layer0;
  import tb_ref_pkg::*;

  logic        clk = 1'b0, reset = 1'b1;
  logic        cmd_valid = 1'b0, cmd_ready;
  logic [9:0]  cmd_payload_function_id = '0;
  logic [31:0] cmd_payload_inputs_0 = '0, cmd_payload_inputs_1 = '0;
  logic        rsp_valid, rsp_ready;
  logic [31:0] rsp_payload_outputs_0;

  fomo_cfu dut (.*);

  always #5 clk = ~clk;
  assign rsp_ready = 1'b1;

  localparam int H = 96, W = 96, K = 3, S = 2, Z = 16;
  localparam int OH = H / S, OW = W / S;

  typedef struct {
    logic [2:0]  f;
    logic [31:0] a, b, exp;
  } op_t;

  op_t cmd_q[$];
  op_t exp_q[$];
  int  checks = 0, failures = 0, received = 0, sent = 0, outputs = 0;
  int  first_cycle = 0, last_cycle = 0, cycle = 0;

  byte img [H][W];
  byte wts [Z][K][K];
  int  bias [Z], mult [Z], shft [Z];

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!reset && cmd_valid && cmd_ready) begin
      if (sent == 0) first_cycle = cycle;
      sent++;
      void'(cmd_q.pop_front());
    end
    if (!reset && rsp_valid && rsp_ready) begin
      op_t e;
      e = exp_q.pop_front();
      if (e.f == 3'd3) begin
        checks++;
        if (rsp_payload_outputs_0 !== e.exp) begin
          failures++;
          if (failures < 10)
            $display("FAIL output %0d: got %0d expected %0d", received,
                     int'(rsp_payload_outputs_0), int'(e.exp));
        end
      end
      received++;
      last_cycle = cycle;
    end
  end

  always @(negedge clk) begin
    if (!reset && cmd_q.size() > 0) begin
      cmd_valid               = 1'b1;
      cmd_payload_function_id = {7'd0, cmd_q[0].f};
      cmd_payload_inputs_0    = cmd_q[0].a;
      cmd_payload_inputs_1    = cmd_q[0].b;
    end else cmd_valid = 1'b0;
  end

  task automatic push(input logic [2:0] f, input logic [31:0] a, input logic [31:0] b,
                      input logic [31:0] exp);
    op_t o;
    o.f = f; o.a = a; o.b = b; o.exp = exp;
    cmd_q.push_back(o);
    exp_q.push_back(o);
  endtask

  // Input pixel with the layer's padding: a zero-point byte outside the frame.
  function automatic byte pix(input int r, input int c, input int zp);
    if (r >= H || c >= W) return byte'(zp);
    return img[r][c];
  endfunction

  initial begin
    int in_off, out_off, lo, hi, sum, n_pushed;
    in_off = 128;            // zero point -128
    out_off = -128;
    lo = -128; hi = 127;
    foreach (img[r, c]) img[r][c] = byte'($urandom);
    foreach (wts[z, i, j]) wts[z][i][j] = byte'($urandom_range(0, 255));
    for (int z = 0; z < Z; z++) begin
      bias[z] = int'($urandom_range(0, 40000)) - 20000;
      mult[z] = int'($urandom_range(32'h4000_0000, 32'h7fff_ffff));
      shft[z] = -int'($urandom_range(8, 10));
    end
    repeat (3) @(posedge clk);
    reset = 1'b0;
    n_pushed = 0;
    for (int z = 0; z < Z; z++) begin
      push(3'd0, {16'(out_off), 16'(in_off)}, bias[z], 0);
      push(3'd1, lo, hi, 0);
      n_pushed += 2;
      for (int oy = 0; oy < OH; oy++)
        for (int ox = 0; ox < OW; ox++) begin
          byte tin[12], tw[12];
          sum = 0;
          for (int t = 0; t < 12; t++) begin
            tin[t] = (t < 9) ? pix(S*oy + t/3, S*ox + t%3, -in_off) : 8'sd0;
            tw[t]  = (t < 9) ? wts[z][t/3][t%3] : 8'sd0;
            if (t < 9) sum += int'(tw[t]) * (int'(tin[t]) + in_off);
          end
          for (int k = 0; k < 3; k++) begin
            push(3'd2, {tin[4*k+3], tin[4*k+2], tin[4*k+1], tin[4*k]},
                       {tw[4*k+3], tw[4*k+2], tw[4*k+1], tw[4*k]}, 0);
          end
          push(3'd3, mult[z], shft[z],
               quantize(sum + bias[z], mult[z], shft[z], out_off, lo, hi));
          n_pushed += 4;
          outputs++;
        end
      // Keep the queues short.
      wait (cmd_q.size() < 64);
    end
    wait (cmd_q.size() == 0);
    wait (received == n_pushed);
    repeat (3) @(posedge clk);
    checks++;
    if (outputs != OH * OW * Z) begin
      failures++;
      $display("FAIL: %0d outputs, expected %0d", outputs, OH * OW * Z);
    end
    $display("layer 0: %0d outputs, %0d commands, %0d cycles in the unit",
             outputs, n_pushed, last_cycle - first_cycle + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
