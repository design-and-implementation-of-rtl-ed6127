// p_counter: programmable P-counter of the pulse-swallow divider.
//
// A P_WIDTH-bit down counter of loadable bit-cells clocked by the prescaler
// output. ld is high while the count is at its end (1, or 0 right after
// reset): a NOR of the upper bits. On the next clock edge every cell loads
// its bit of p, so the count runs p, p-1, ..., 1, p, ... and ld is high for
// one clock in every p clocks. ld also reloads the S-counter and so ends
// one output period of the divider.
// Timing: ld rises one clock edge after the count reaches 1, and the first
// reload happens on the first clock edge after reset.
// The 7-bit width and the reload at the end of the count follow the
// published divider; treating the count of 1 as the end (so that the period
// is exactly p rather than p+1) is this design's choice.
`timescale 1ns/1ps
module p_counter #(
  parameter int unsigned P_WIDTH = divider_pkg::P_WIDTH_DEF
) (
  input  logic               clk,   // prescaler output
  input  logic               rst,   // asynchronous reset, active high
  input  logic [P_WIDTH-1:0] p,     // programmed P value (>= 2)
  output logic               ld,    // reload strobe, one clock in p
  output logic [P_WIDTH-1:0] count
);
  logic [P_WIDTH-1:0] t_en;

  // Down count: a bit toggles when all bits below it are zero.
  assign t_en[0] = 1'b1;
  for (genvar i = 1; i < P_WIDTH; i++) begin : g_ten
    assign t_en[i] = t_en[i-1] & ~count[i-1];
  end

  for (genvar i = 0; i < P_WIDTH; i++) begin : g_cell
    loadable_bitcell u_cell (.clk(clk), .rst(rst), .ld(ld), .hold(1'b0),
                             .t_en(t_en[i]), .pi(p[i]), .q(count[i]));
  end

  assign ld = ~|count[P_WIDTH-1:1];
endmodule
