// cfu_ctrl: control unit of the accelerator.
//
// Runs the CPU's command/response handshake and steers the mac, bias and
// quantizer units, as the design's control unit does. A command is accepted
// (cmd_valid && cmd_ready) only while the unit is idle and the response
// buffer is empty or is being emptied in the same cycle, so every command
// gets exactly one response, in order.
//
// INIT0, INIT1 and ACC finish in the cycle they are accepted: their response
// is written to the response buffer at that edge and is valid in the next
// cycle. READ takes three cycles: at the accepting edge the bias unit
// registers acc + bias, the quantizer captures multiplier and shift and the
// accumulator is cleared; state MUL registers the quantizer's first stage;
// state SHIFT writes the quantizer output to the response buffer. Unknown
// funct3 values are answered with zero so that the CPU never waits forever.
// The state machine and its cycle counts are this design's choice.
//
// Interface: cmd_valid/cmd_ready and funct3 from the CPU, rsp_valid (state
// of the response buffer) and rsp_ready from the CPU; every other output is
// a one-cycle enable for a datapath unit, plus res_sel choosing the word
// written to the response buffer.
module cfu_ctrl
  import cfu_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  logic       cmd_valid,
  output logic       cmd_ready,
  input  logic [2:0] funct3,
  input  logic       rsp_valid,
  input  logic       rsp_ready,
  // mac unit
  output logic       mac_off_load,
  output logic       mac_clear,
  output logic       mac_acc_en,
  // bias unit
  output logic       bias_load,
  output logic       bias_sum_en,
  // quantizer
  output logic       q_off_load,
  output logic       q_lim_load,
  output logic       q_start,
  output logic       q_stage1_en,
  // response buffer
  output logic       res_load,
  output res_sel_e   res_sel
);

  typedef enum logic [1:0] {S_IDLE, S_MUL, S_SHIFT} state_e;
  state_e state, state_n;

  logic fire;
  cmd_e cmd;

  assign cmd_ready = (state == S_IDLE) && (!rsp_valid || rsp_ready);
  assign fire      = cmd_valid && cmd_ready;
  assign cmd       = decode(funct3);

  always_comb begin
    state_n      = state;
    mac_off_load = 1'b0;
    mac_clear    = 1'b0;
    mac_acc_en   = 1'b0;
    bias_load    = 1'b0;
    bias_sum_en  = 1'b0;
    q_off_load   = 1'b0;
    q_lim_load   = 1'b0;
    q_start      = 1'b0;
    q_stage1_en  = 1'b0;
    res_load     = 1'b0;
    res_sel      = RES_ZERO;
    unique case (state)
      S_IDLE: if (fire) begin
        case (cmd)
          CMD_INIT0: begin
            mac_off_load = 1'b1;
            q_off_load   = 1'b1;
            bias_load    = 1'b1;
            mac_clear    = 1'b1;
            res_load     = 1'b1;
          end
          CMD_INIT1: begin
            q_lim_load = 1'b1;
            res_load   = 1'b1;
          end
          CMD_ACC: begin
            mac_acc_en = 1'b1;
            res_load   = 1'b1;
            res_sel    = RES_ACC;
          end
          CMD_READ: begin
            bias_sum_en = 1'b1;
            q_start     = 1'b1;
            mac_clear   = 1'b1;
            state_n     = S_MUL;
          end
          default: res_load = 1'b1;
        endcase
      end
      S_MUL: begin
        q_stage1_en = 1'b1;
        state_n     = S_SHIFT;
      end
      S_SHIFT: begin
        res_load = 1'b1;
        res_sel  = RES_QUANT;
        state_n  = S_IDLE;
      end
      default: state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (reset) state <= S_IDLE;
    else       state <= state_n;
  end

  // A command must be held until it is accepted.
  assert property (@(posedge clk) disable iff (reset)
                   cmd_valid && !cmd_ready |=> cmd_valid)
    else $error("cfu_ctrl: cmd_valid dropped before acceptance");

endmodule
