// sr_flipflop: clocked set/reset flip-flop.
//
// On a rising clock edge: s=1,r=0 sets q; s=0,r=1 clears q; s=r=0 keeps q;
// s=r=1 (not allowed in a classic SR latch) toggles q. qb is the
// complement. Wired with s = qb and r = q it divides its clock by 2, which
// is how the divide-by-64 chain uses it.
// Only the name and its use as the four stages after the 4/5 prescaler
// come from the published screenshots; the behaviour for s=r=1 and the
// asynchronous active-high reset are this design's choices.
`timescale 1ns/1ps
module sr_flipflop (
  input  logic clk,
  input  logic rst,   // asynchronous reset, active high, clears q
  input  logic s,     // set
  input  logic r,     // reset (synchronous)
  output logic q,
  output logic qb
);
  always_ff @(posedge clk or posedge rst) begin
    if (rst) q <= 1'b0;
    else begin
      unique case ({s, r})
        2'b10:   q <= 1'b1;
        2'b01:   q <= 1'b0;
        2'b11:   q <= ~q;
        default: q <= q;
      endcase
    end
  end

  assign qb = ~q;
endmodule
