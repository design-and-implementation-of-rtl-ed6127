// mm_prescaler: multimodulus 32/33/47/48 prescaler.
//
// A 2/3 prescaler drives a ripple chain of STAGES divide-by-2 stages, so one
// output period holds 2**STAGES (16) periods of the 2/3 prescaler. The chain
// counts down; the output fp rises when it wraps from 0 to all-ones. Gates
// on the stage outputs mark the last 2/3 period before the wrap ("last") and
// set the 2/3 modulus control mc for that period only:
//   sel = 0 (32/33): mc = ~(last & ~mod)  -> mod=0: 15*2+3 = 33, mod=1: 32
//   sel = 1 (47/48): mc =  (last &  mod)  -> mod=0: 16*3 = 48,   mod=1: 15*3+2 = 47
// So mod = 0 always selects N+1 and mod = 1 selects N, as the pulse-swallow
// counters expect. mod and sel may change on any rising edge of fp: they
// are read only in the last 2/3 period, well after that edge.
// The moduli, the 2/3 + divide-by-2 structure and the roles of MOD and Sel
// follow the published divider; the exact gates that form mc are this
// design's own (the published description names those gates but does not
// give their logic).
`timescale 1ns/1ps
module mm_prescaler #(
  parameter int unsigned STAGES = 4      // divide-by-2 stages after the 2/3 prescaler
) (
  input  logic fin,   // input clock
  input  logic rst,   // asynchronous reset, active high
  input  logic mod,   // 0: divide by N+1, 1: divide by N
  input  logic sel,   // 0: N = 32, 1: N = 47
  output logic fp     // prescaler output
);
  logic              f23;          // 2/3 prescaler output
  logic [STAGES-1:0] q;            // ripple stage outputs
  logic              last;         // last 2/3 period of the output period
  logic              mc;

  prescaler_2_3 u_p23 (.clk(fin), .rst(rst), .mc(mc), .fo(f23));

  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    if (i == 0) begin : g_first
      toggle_stage u_t (.clk(f23), .rst(rst), .q(q[0]));
    end else begin : g_next
      toggle_stage u_t (.clk(q[i-1]), .rst(rst), .q(q[i]));
    end
  end

  assign last = ~|q;
  assign mc   = sel ? (last & mod) : ~(last & ~mod);
  assign fp   = q[STAGES-1];
endmodule
