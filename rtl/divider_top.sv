// divider_top: the two single-phase-clock dividers side by side.
//
// u_multiband is the multiband pulse-swallow divider (fin / (N*P + S), with
// N = 32 or 47 chosen by bit 5 of p_word). u_div64 is the divide-by-64/80
// chain (clk / 64 for mc = 0, clk / 80 for mc = 1). The two share only the
// reset; each has its own clock. In a frequency synthesizer fin would come
// from the VCO and fout would go to the phase detector, both outside this
// design.
`timescale 1ns/1ps
module divider_top (
  input  logic       rst,      // asynchronous reset, active high
  // multiband divider
  input  logic       fin,
  input  logic [6:0] p_word,
  input  logic [5:0] s_word,
  output logic       fout,
  output logic       fp,
  output logic       mod_o,
  // divide-by-64/80 chain
  input  logic       clk,
  input  logic       mc,
  output logic       f
);
  multiband_divider u_multiband (.fin(fin), .rst(rst), .p(p_word), .s(s_word),
                                 .fout(fout), .fp(fp), .mod(mod_o));

  divided64 u_div64 (.clk(clk), .rst(rst), .mc(mc), .f(f));
endmodule
