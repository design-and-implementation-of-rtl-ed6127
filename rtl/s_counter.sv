// s_counter: swallow (S) counter with the MOD flip-flop.
//
// S_WIDTH loadable bit-cells form a down counter clocked by the prescaler
// output, and a flip-flop with a NOR on its input produces mod.
//   ld = 1 : the cells load s and mod is cleared (mod = 1 at once if s = 0)
//   mod = 0: the counter counts down; when it steps from 1 to 0, mod rises
//   mod = 1: the cells are idle (no switching) until the next ld
// So after each reload mod stays 0 for exactly s clocks. mod = 0 selects the
// N+1 modulus of the prescaler and mod = 1 the N modulus.
// The bit-cells with MOD-controlled idling, the NOR-embedded MOD flip-flop
// and MOD = 0 after a reload follow the published divider. Setting mod at
// once when s = 0 is this design's choice, so that s = 0 gives N*P exactly.
`timescale 1ns/1ps
module s_counter #(
  parameter int unsigned S_WIDTH = divider_pkg::S_WIDTH_DEF
) (
  input  logic               clk,   // prescaler output
  input  logic               rst,   // asynchronous reset, active high (sets mod)
  input  logic               ld,    // reload from the P-counter
  input  logic [S_WIDTH-1:0] s,     // programmed swallow count
  output logic               mod,   // 0: N+1 mode, 1: N mode
  output logic [S_WIDTH-1:0] count
);
  logic [S_WIDTH-1:0] t_en;

  // Down count: a bit toggles when all bits below it are zero.
  assign t_en[0] = 1'b1;
  for (genvar i = 1; i < S_WIDTH; i++) begin : g_ten
    assign t_en[i] = t_en[i-1] & ~count[i-1];
  end

  for (genvar i = 0; i < S_WIDTH; i++) begin : g_cell
    loadable_bitcell u_cell (.clk(clk), .rst(rst), .ld(ld), .hold(mod),
                             .t_en(t_en[i]), .pi(s[i]), .q(count[i]));
  end

  // NOR-embedded flip-flop: the count at 1 (upper bits all zero) ends the
  // swallow phase on the next edge.
  always_ff @(posedge clk or posedge rst) begin
    if (rst)     mod <= 1'b1;
    else if (ld) mod <= ~|s;
    else         mod <= mod | ~|count[S_WIDTH-1:1];
  end
endmodule
