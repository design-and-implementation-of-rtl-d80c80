// bias_unit: adds the output channel's bias to the finished dot product.
//
// The bias of the output channel being computed is stored by the INIT0
// command. When a READ command is accepted, sum_en captures acc + bias in
// the sum register, which feeds the quantizer in the following cycles. This
// is the bias step of the convolution (R += B) as the design describes it;
// the one-cycle registered adder and the 32-bit wrap-around arithmetic are
// this design's choices.
//
// Interface (synchronous, reset active high):
//   bias_load / bias_in : store the bias
//   sum_en / acc_in     : register acc_in + bias
//   sum                 : registered biased sum, valid the cycle after sum_en
module bias_unit
  import cfu_pkg::*;
#(
  parameter int unsigned W = XLEN
) (
  input  logic                clk,
  input  logic                reset,
  input  logic                bias_load,
  input  logic signed [W-1:0] bias_in,
  input  logic                sum_en,
  input  logic signed [W-1:0] acc_in,
  output logic signed [W-1:0] sum
);

  logic signed [W-1:0] bias_q;

  always_ff @(posedge clk) begin
    if (reset) begin
      bias_q <= '0;
      sum    <= '0;
    end else begin
      if (bias_load) bias_q <= bias_in;
      if (sum_en)    sum    <= acc_in + bias_q;
    end
  end

endmodule
