// result_reg: the response buffer of the accelerator.
//
// Holds the word returned to the CPU, with its valid flag, until the CPU
// takes it (rsp_valid && rsp_ready). The design calls for a simple register
// that buffers results; the valid/ready hold behaviour is this design's
// choice, made so that the CPU may be slow to take a response.
//
// Interface (synchronous, reset active high):
//   load / d   : capture a new response; only allowed when the buffer is
//                empty or is being emptied in the same cycle
//   valid / q  : the response presented to the CPU
//   ready      : the CPU takes the response this cycle
module result_reg
  import cfu_pkg::*;
#(
  parameter int unsigned W = XLEN
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         load,
  input  logic [W-1:0] d,
  input  logic         ready,
  output logic         valid,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (reset) begin
      valid <= 1'b0;
      q     <= '0;
    end else if (load) begin
      valid <= 1'b1;
      q     <= d;
    end else if (ready) begin
      valid <= 1'b0;
    end
  end

  // A response that has not been taken must not be overwritten.
  assert property (@(posedge clk) disable iff (reset) load |-> (!valid || ready))
    else $error("result_reg: response overwritten before it was taken");

endmodule
