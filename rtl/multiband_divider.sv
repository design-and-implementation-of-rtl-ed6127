// multiband_divider: low-power multiband flexible integer-N divider.
//
// Pulse-swallow topology. The multimodulus prescaler divides fin by N+1
// while mod = 0 and by N while mod = 1. Its output fp clocks the P-counter
// and the S-counter. Every P periods of fp the P-counter raises ld, which
// reloads both counters and clears mod; the S-counter then lets S periods
// of fp run at N+1 and raises mod for the remaining P-S periods. One output
// period therefore lasts (N+1)*S + N*(P-S) = N*P + S periods of fin.
// Band: Sel is bit 5 (weight 32) of the P word, so P in 75..78 selects
// N = 32 (2.4 GHz band) and P in 105..122 selects N = 47 (5-5.8 GHz band).
// Interface: p and s are static programming words (2 <= P, S <= P,
// checked by assertions at each reload); fout is high for one fp period
// per output period and is registered on fp.
// The structure and N*P + S follow the published divider; taking Sel from
// bit 5 of P and registering fout are this design's choices.
`timescale 1ns/1ps
module multiband_divider #(
  parameter int unsigned P_WIDTH = divider_pkg::P_WIDTH_DEF,
  parameter int unsigned S_WIDTH = divider_pkg::S_WIDTH_DEF
) (
  input  logic               fin,   // input clock (VCO)
  input  logic               rst,   // asynchronous reset, active high
  input  logic [P_WIDTH-1:0] p,     // P-counter word, bit SEL_BIT is Sel
  input  logic [S_WIDTH-1:0] s,     // S-counter word
  output logic               fout,  // divided output
  output logic               fp,    // prescaler output
  output logic               mod    // modulus control
);
  logic               sel;
  logic               ld;

  assign sel = p[divider_pkg::SEL_BIT];

  mm_prescaler u_pre (.fin(fin), .rst(rst), .mod(mod), .sel(sel), .fp(fp));

  p_counter #(.P_WIDTH(P_WIDTH)) u_p (.clk(fp), .rst(rst), .p(p), .ld(ld), .count());

  s_counter #(.S_WIDTH(S_WIDTH)) u_s (.clk(fp), .rst(rst), .ld(ld), .s(s), .mod(mod),
                                      .count());

  always_ff @(posedge fp or posedge rst) begin
    if (rst) fout <= 1'b0;
    else     fout <= ld;
  end

  // Programming rules, checked at every reload: the swallow count must fit
  // in the P period, and P must be at least 2. fp stays low during reset,
  // so no check fires while rst is high.
  a_swallow_fits: assert property (@(posedge fp) ld |-> (int'(s) <= int'(p)))
    else $error("S=%0d exceeds P=%0d", s, p);
  a_p_min: assert property (@(posedge fp) ld |-> (int'(p) >= 2))
    else $error("P=%0d is below 2", p);
endmodule
