// toggle_stage: asynchronous divide-by-2 stage of the multimodulus prescaler.
//
// A flip-flop that inverts its state on every rising edge of clk, so q runs
// at half the frequency of clk with 50% duty cycle. Stages are cascaded as a
// ripple chain, each clocked by the previous q; because each toggles on the
// rising edge of the one before, the chain counts down.
`timescale 1ns/1ps
module toggle_stage (
  input  logic clk,  // clock (output of the previous stage)
  input  logic rst,  // asynchronous reset, active high
  output logic q     // clk / 2
);
  always_ff @(posedge clk or posedge rst) begin
    if (rst) q <= 1'b0;
    else     q <= ~q;
  end
endmodule
