// cfu_pkg: types and constants shared by the FOMO convolution accelerator.
//
// The accelerator is a custom function unit (CFU) attached to a 32-bit
// RISC-V CPU. The CPU selects an operation with funct3, the low three bits
// of the 10-bit function id {funct7, funct3}; funct7 is ignored. The four
// operations follow the command set described for the design (two
// initialisation commands, a SIMD accumulate command and a read command);
// their numbering and the packing of the operands are this design's choice:
//
//   CMD_INIT0 : rs1 = {output_offset[15:0], input_offset[15:0]}, rs2 = bias.
//               Also clears the accumulator (start of a new output value).
//   CMD_INIT1 : rs1 = activation minimum, rs2 = activation maximum.
//   CMD_ACC   : rs1 = four int8 input bytes, rs2 = four int8 filter bytes.
//               Response is the new accumulator value.
//   CMD_READ  : rs1 = fixed-point output multiplier (Q31),
//               rs2 = output shift (signed, <0 shifts right).
//               Response is the biased, requantized, clamped output;
//               the accumulator is cleared.
package cfu_pkg;

  localparam int unsigned XLEN   = 32;  // CPU word width
  localparam int unsigned LANES  = 4;   // bytes per SIMD operand word
  localparam int unsigned BYTE_W = 8;   // int8 quantized data
  localparam int unsigned OFF_W  = 16;  // width of each packed offset

  typedef enum logic [2:0] {
    CMD_INIT0 = 3'd0,
    CMD_INIT1 = 3'd1,
    CMD_ACC   = 3'd2,
    CMD_READ  = 3'd3
  } cmd_e;

  // Source of the word written to the response buffer.
  typedef enum logic [1:0] {
    RES_ZERO  = 2'd0,
    RES_ACC   = 2'd1,
    RES_QUANT = 2'd2
  } res_sel_e;

  // Operands of one command as the CPU presents them.
  typedef struct packed {
    logic [9:0]      function_id;
    logic [XLEN-1:0] in0;
    logic [XLEN-1:0] in1;
  } cmd_payload_t;

  // Signed 16-bit offsets packed in one word (see CMD_INIT0).
  typedef struct packed {
    logic signed [OFF_W-1:0] output_offset;
    logic signed [OFF_W-1:0] input_offset;
  } offsets_t;

  // funct3 is the low three bits of the function id.
  function automatic cmd_e decode(input logic [2:0] funct3);
    return cmd_e'(funct3);
  endfunction

endpackage
