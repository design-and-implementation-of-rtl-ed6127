// prescaler_2_3: dual-modulus 2/3 prescaler, the first stage of the divider.
//
// Divides clk by 2 while mc = 1 and by 3 while mc = 0. Two flip-flops:
// q1 is the output, q2 inserts the extra input cycle. From state q1=1 the
// next state is q2 = ~mc, so mc is sampled on the second clock edge of each
// output period; mc must be stable there and may change anywhere else.
// Output: fo rises on the first edge of each period and is high for one
// input cycle (low for 1 or 2 cycles).
// The polarity (mc = 1 -> divide by 2) follows the description of the 32/33
// mode; the two-flip-flop state machine is this design's own, standing in
// for the dynamic single-phase-clock circuit of the original.
`timescale 1ns/1ps
module prescaler_2_3 (
  input  logic clk,   // input clock
  input  logic rst,   // asynchronous reset, active high
  input  logic mc,    // modulus control: 1 = divide by 2, 0 = divide by 3
  output logic fo     // divided clock
);
  logic q1, q2;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      q1 <= 1'b0;
      q2 <= 1'b0;
    end else begin
      q1 <= ~(q1 | q2);
      q2 <= q1 & ~mc;
    end
  end

  assign fo = q1;
endmodule
