// fomo_cfu: compact convolution accelerator for a 32-bit RISC-V soft CPU.
//
// The CPU runs an int8 object-detection network and hands the innermost part
// of every convolution and depthwise convolution to this unit through custom
// instructions: the dot product of input and filter bytes, the bias addition
// and the requantization of the result. The unit is built, as the design
// describes, from three datapath units (mac, bias, quantizer), a control unit
// that speaks the CPU's command/response protocol and a register that buffers
// results:
//
//   cmd --> cfu_ctrl --enables--> simd_mac --acc--> bias_unit --sum--> quantizer
//                                    |                                    |
//                                    +--acc_next--> result_reg <--out-----+
//
// Commands (funct3 of the function id; operand packing is this design's
// choice, see cfu_pkg):
//   0 INIT0  rs1 = {output_offset, input_offset} (16 bits each), rs2 = bias
//   1 INIT1  rs1 = activation min, rs2 = activation max
//   2 ACC    rs1 = 4 input bytes, rs2 = 4 filter bytes; returns accumulator
//   3 READ   rs1 = Q31 multiplier, rs2 = shift; returns the output value
//
// Protocol: the port names and the valid/ready handshake on the command and
// response channels are those of the CPU's custom-function-unit bus. A
// command is accepted when cmd_valid && cmd_ready; its response is held on
// rsp_payload_outputs_0 while rsp_valid is high until rsp_ready. Latency from
// the accepting edge to rsp_valid: one cycle for INIT0/INIT1/ACC, three for
// READ. The unit accepts one command per cycle when rsp_ready stays high.
module fomo_cfu
  import cfu_pkg::*;
(
  input  logic            clk,
  input  logic            reset,
  input  logic            cmd_valid,
  output logic            cmd_ready,
  input  logic [9:0]      cmd_payload_function_id,
  input  logic [XLEN-1:0] cmd_payload_inputs_0,
  input  logic [XLEN-1:0] cmd_payload_inputs_1,
  output logic            rsp_valid,
  input  logic            rsp_ready,
  output logic [XLEN-1:0] rsp_payload_outputs_0
);

  cmd_payload_t cmd;
  offsets_t     offs;

  assign cmd  = '{function_id: cmd_payload_function_id,
                  in0: cmd_payload_inputs_0, in1: cmd_payload_inputs_1};
  assign offs = offsets_t'(cmd.in0);

  logic     mac_off_load, mac_clear, mac_acc_en;
  logic     bias_load, bias_sum_en;
  logic     q_off_load, q_lim_load, q_start, q_stage1_en;
  logic     res_load;
  res_sel_e res_sel;

  logic signed [XLEN-1:0] acc, acc_next, sum, q_out;
  logic        [XLEN-1:0] res_d;

  cfu_ctrl u_ctrl (
    .clk, .reset,
    .cmd_valid,
    .cmd_ready,
    .funct3      (cmd.function_id[2:0]),
    .rsp_valid,
    .rsp_ready,
    .mac_off_load, .mac_clear, .mac_acc_en,
    .bias_load, .bias_sum_en,
    .q_off_load, .q_lim_load, .q_start, .q_stage1_en,
    .res_load, .res_sel
  );

  simd_mac u_mac (
    .clk, .reset,
    .off_load     (mac_off_load),
    .input_offset (offs.input_offset),
    .clear        (mac_clear),
    .acc_en       (mac_acc_en),
    .in_bytes     (cmd.in0),
    .filt_bytes   (cmd.in1),
    .acc          (acc),
    .acc_next     (acc_next)
  );

  bias_unit u_bias (
    .clk, .reset,
    .bias_load (bias_load),
    .bias_in   (cmd.in1),
    .sum_en    (bias_sum_en),
    .acc_in    (acc),
    .sum       (sum)
  );

  quantizer u_quant (
    .clk, .reset,
    .off_load      (q_off_load),
    .output_offset (offs.output_offset),
    .lim_load      (q_lim_load),
    .act_min       (cmd.in0),
    .act_max       (cmd.in1),
    .start         (q_start),
    .multiplier    (cmd.in0),
    .shift         (cmd.in1),
    .stage1_en     (q_stage1_en),
    .sum           (sum),
    .out           (q_out)
  );

  always_comb begin
    unique case (res_sel)
      RES_ACC:   res_d = acc_next;
      RES_QUANT: res_d = q_out;
      default:   res_d = '0;
    endcase
  end

  result_reg u_res (
    .clk, .reset,
    .load  (res_load),
    .d     (res_d),
    .ready (rsp_ready),
    .valid (rsp_valid),
    .q     (rsp_payload_outputs_0)
  );

  // The response must stay stable until the CPU takes it.
  assert property (@(posedge clk) disable iff (reset)
                   rsp_valid && !rsp_ready |=> rsp_valid && $stable(rsp_payload_outputs_0))
    else $error("fomo_cfu: response changed before it was taken");

endmodule
