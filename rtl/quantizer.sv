// quantizer: requantizes a biased 32-bit sum to the layer's output scale.
//
// The design's quantizer performs "multiplication - limitation": the biased
// sum is scaled (R *= S), the output offset is added (R += O) and the result
// is limited to the activation range. The scale is carried, as in common
// int8 inference runtimes, as a Q31 fixed-point multiplier and a signed
// power-of-two shift; the arithmetic below reproduces that runtime's
// reference rounding exactly:
//   1. x = sum << max(shift, 0)                 (32-bit wrap)
//   2. h = round-half-away-from-zero((x * multiplier) / 2^31), saturating the
//      single overflow case multiplier = x = -2^31 to 2^31-1
//   3. y = h / 2^max(-shift, 0), rounded half away from zero
//   4. out = clamp(y + output_offset, act_min, act_max)
// The fixed-point format and the rounding rules are this design's choice;
// the document gives only the three steps.
//
// Timing: two steps. start captures multiplier and shift (the sum arrives
// from the bias unit in the same edge); stage1_en registers h (steps 1-2) one
// cycle later; out (steps 3-4) is combinational from that register and is
// valid in the cycle after stage1_en.
//
// Configuration (synchronous, reset active high):
//   off_load / output_offset : from the INIT0 command
//   lim_load / act_min / act_max : from the INIT1 command
module quantizer
  import cfu_pkg::*;
(
  input  logic                   clk,
  input  logic                   reset,
  input  logic                   off_load,
  input  logic signed [OFF_W-1:0] output_offset,
  input  logic                   lim_load,
  input  logic signed [XLEN-1:0] act_min,
  input  logic signed [XLEN-1:0] act_max,
  input  logic                   start,
  input  logic signed [XLEN-1:0] multiplier,
  input  logic signed [XLEN-1:0] shift,
  input  logic                   stage1_en,
  input  logic signed [XLEN-1:0] sum,
  output logic signed [XLEN-1:0] out
);

  localparam logic signed [XLEN-1:0] MIN32 = {1'b1, {(XLEN-1){1'b0}}};
  localparam logic signed [XLEN-1:0] MAX32 = {1'b0, {(XLEN-1){1'b1}}};

  logic signed [OFF_W-1:0] out_off_q;
  logic signed [XLEN-1:0]  min_q, max_q, mult_q;
  logic [4:0]              lshift_q, rshift_q;
  logic signed [XLEN-1:0]  high_q;

  // Shift amount split into a left part (before the multiply) and a right
  // part (after it), limited to 0..31.
  function automatic logic [4:0] clip31(input logic signed [XLEN-1:0] v);
    if (v <= 0)       return 5'd0;
    else if (v >= 31) return 5'd31;
    else              return v[4:0];
  endfunction

  // Step 1 and 2: doubling high multiply with rounding.
  logic signed [XLEN-1:0]   x;
  logic signed [2*XLEN-1:0] prod, nudged;
  logic signed [XLEN-1:0]   high;
  always_comb begin
    x      = sum <<< lshift_q;
    prod   = (2*XLEN)'(x) * (2*XLEN)'(mult_q);
    nudged = prod + ((prod >= 0) ? (2*XLEN)'(64'sd1 <<< 30)
                                 : (2*XLEN)'(64'sd1 - (64'sd1 <<< 30)));
    // Division by 2^31 truncating toward zero.
    high   = XLEN'(nudged >>> 31);
    if (nudged < 0 && nudged[30:0] != '0) high = high + 1;
    if (x == MIN32 && mult_q == MIN32) high = MAX32;
  end

  // Step 3 and 4: rounding right shift, offset, clamp.
  logic [XLEN-1:0]        mask, rem, thr;
  logic signed [XLEN-1:0] y, z;
  always_comb begin
    mask = (XLEN'(1) << rshift_q) - 1;
    rem  = high_q & mask;
    thr  = (mask >> 1) + XLEN'(high_q < 0);
    y    = (high_q >>> rshift_q) + ((rem > thr) ? 1 : 0);
    z    = y + XLEN'(out_off_q);
    if (z < min_q)      out = min_q;
    else if (z > max_q) out = max_q;
    else                out = z;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      out_off_q <= '0;
      min_q     <= MIN32;
      max_q     <= MAX32;
      mult_q    <= '0;
      lshift_q  <= '0;
      rshift_q  <= '0;
      high_q    <= '0;
    end else begin
      if (off_load) out_off_q <= output_offset;
      if (lim_load) begin
        min_q <= act_min;
        max_q <= act_max;
      end
      if (start) begin
        mult_q   <= multiplier;
        lshift_q <= clip31(shift);
        rshift_q <= clip31(-shift);
      end
      if (stage1_en) high_q <= high;
    end
  end

endmodule
