// divided64: divide-by-64/80 chain built from a 4/5 prescaler.
//
// The 4/5 prescaler (u5) divides clk by 4 (mc = 0) or 5 (mc = 1); four SR
// flip-flops (u1..u4), each wired as a divide-by-2 and clocked by the
// previous stage, divide by a further 16. f therefore has a period of 64
// (mc = 0) or 80 (mc = 1) clk cycles, with 50% duty cycle. Seven one-bit
// registers in all.
// The instance names, the ports clk, mc, rst and f, and the 4/5 prescaler
// followed by four SR flip-flops come from the published screenshots; the
// ripple clocking of the stages is this design's reading of them.
`timescale 1ns/1ps
module divided64 (
  input  logic clk,
  input  logic rst,  // asynchronous reset, active high
  input  logic mc,   // 0: divide by 64, 1: divide by 80
  output logic f
);
  logic [4:0] stage_clk;   // stage_clk[0]: prescaler output
  logic [3:0] q, qb;

  prescaler_4_5 u5 (.clk(clk), .rst(rst), .mc(mc), .f(stage_clk[0]));

  sr_flipflop u1 (.clk(stage_clk[0]), .rst(rst), .s(qb[0]), .r(q[0]), .q(q[0]), .qb(qb[0]));
  sr_flipflop u2 (.clk(stage_clk[1]), .rst(rst), .s(qb[1]), .r(q[1]), .q(q[1]), .qb(qb[1]));
  sr_flipflop u3 (.clk(stage_clk[2]), .rst(rst), .s(qb[2]), .r(q[2]), .q(q[2]), .qb(qb[2]));
  sr_flipflop u4 (.clk(stage_clk[3]), .rst(rst), .s(qb[3]), .r(q[3]), .q(q[3]), .qb(qb[3]));

  assign stage_clk[4:1] = q;
  assign f = stage_clk[4];
endmodule
