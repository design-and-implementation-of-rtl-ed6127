// prescaler_4_5: 4/5 dual-modulus prescaler of the divide-by-64 chain.
//
// Three flip-flops. a and b form a two-bit Johnson ring (divide by 4); the
// third flip-flop c, enabled by mc, holds the ring back for one extra clock:
//   a <= ~(b | c);  b <= a;  c <= b & mc
// mc = 0: states ab 00,10,11,01 -> divide by 4
// mc = 1: states abc 000,100,110,011,001 -> divide by 5
// Output f = b, high for two input cycles in each period. mc is read on
// every clock; change it while b = 0 to avoid one irregular period.
// Only the module's name, its ports (clk, rst, mc, f) and the count of
// seven one-bit registers in the whole chain come from the published
// screenshots; the gates, and mc = 0 selecting divide by 4 (the chain is
// named "divided64" and its simulation is shown with mc = 0), are this
// design's own.
`timescale 1ns/1ps
module prescaler_4_5 (
  input  logic clk,  // input clock
  input  logic rst,  // asynchronous reset, active high
  input  logic mc,   // 0: divide by 4, 1: divide by 5
  output logic f     // divided clock
);
  logic a, b, c;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      a <= 1'b0;
      b <= 1'b0;
      c <= 1'b0;
    end else begin
      a <= ~(b | c);
      b <= a;
      c <= b & mc;
    end
  end

  assign f = b;
endmodule
