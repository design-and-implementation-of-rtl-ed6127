// loadable_bitcell: one bit of the programmable S- and P-counters.
//
// Three modes, in priority order:
//   ld = 1             : q takes the programming bit pi (counter reload)
//   hold = 1 (MOD = 1) : the cell is idle and keeps its state
//   otherwise          : the cell divides by 2, toggling when t_en = 1
// The idle mode is the power-saving feature of the S-counter cell: once the
// swallow count is done the cell stops switching until the next reload. The
// P-counter ties hold to 0.
// The three modes follow the published bit-cell. The cells of the original
// are clocked in a ripple chain with an asynchronous load; here every cell
// of a counter shares the counter clock and t_en = "all lower bits are zero"
// gives the same down count without a zero-delay race between load and
// clock. ld takes priority over hold so that an idle S-counter can still be
// reloaded.
`timescale 1ns/1ps
module loadable_bitcell (
  input  logic clk,   // counter clock (prescaler output)
  input  logic rst,   // asynchronous reset, active high, clears q
  input  logic ld,    // load pi
  input  logic hold,  // idle (MOD)
  input  logic t_en,  // toggle enable (all lower bits zero)
  input  logic pi,    // programming input bit
  output logic q
);
  always_ff @(posedge clk or posedge rst) begin
    if (rst)                q <= 1'b0;
    else if (ld)            q <= pi;
    else if (!hold && t_en) q <= ~q;
  end
endmodule
