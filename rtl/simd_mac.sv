// simd_mac: the SIMD multiply-accumulate unit of the convolution accelerator.
//
// One accumulate command delivers LANES int8 input values and LANES int8
// filter values packed in two 32-bit words. Each lane adds the layer's input
// offset to its input byte and multiplies the result by its filter byte; the
// LANES products are summed and added to a 32-bit accumulator in the same
// cycle. This is the innermost statement of the convolution,
//     R += W * (I + input_offset),
// done four bytes at a time, as the design describes. Lane count and the
// offset-before-multiply order follow the described computation; the
// single-cycle adder tree, the 16-bit offset register and the 32-bit
// wrap-around accumulator are this design's choices.
//
// Interface (all synchronous to clk, reset active high):
//   off_load / input_offset : store the input offset (from the INIT0 command)
//   clear                   : zero the accumulator (INIT0 and READ commands)
//   acc_en / in_bytes / filt_bytes : add one SIMD dot product
//   acc      : accumulator register
//   acc_next : value acc takes at the next edge (returned by the ACC command)
// If clear and acc_en are both high, the accumulator restarts at the new
// dot product.
module simd_mac
  import cfu_pkg::*;
#(
  parameter int unsigned LANES_P = LANES,
  parameter int unsigned ACC_W   = XLEN
) (
  input  logic                       clk,
  input  logic                       reset,
  input  logic                       off_load,
  input  logic signed [OFF_W-1:0]    input_offset,
  input  logic                       clear,
  input  logic                       acc_en,
  input  logic [LANES_P*BYTE_W-1:0]  in_bytes,
  input  logic [LANES_P*BYTE_W-1:0]  filt_bytes,
  output logic signed [ACC_W-1:0]    acc,
  output logic signed [ACC_W-1:0]    acc_next
);

  logic signed [OFF_W-1:0] offset_q;
  logic signed [ACC_W-1:0] dot;

  // Sum of the LANES products; each term fits in 8+17 bits.
  always_comb begin
    dot = '0;
    for (int i = 0; i < int'(LANES_P); i++) begin
      logic signed [BYTE_W-1:0] x, w;
      logic signed [OFF_W:0]    xo;
      x   = in_bytes[i*BYTE_W +: BYTE_W];
      w   = filt_bytes[i*BYTE_W +: BYTE_W];
      xo  = (OFF_W+1)'(x) + (OFF_W+1)'(offset_q);
      dot = dot + ACC_W'(xo * w);
    end
  end

  always_comb begin
    acc_next = clear ? '0 : acc;
    if (acc_en) acc_next = acc_next + dot;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      offset_q <= '0;
      acc      <= '0;
    end else begin
      if (off_load) offset_q <= input_offset;
      if (clear || acc_en) acc <= acc_next;
    end
  end

endmodule
