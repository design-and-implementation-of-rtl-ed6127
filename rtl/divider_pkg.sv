// divider_pkg: constants shared by the multiband pulse-swallow divider.
//
// Counter widths and the two prescaler moduli pairs. The widths (7-bit P,
// 6-bit S) and the moduli 32/33 and 47/48 follow the published divider; the
// helper function gives the overall division ratio N*P + S that the
// divider produces, and is used by the testbenches as the reference.
`timescale 1ns/1ps
package divider_pkg;
  localparam int unsigned P_WIDTH_DEF = 7;   // P-counter bits
  localparam int unsigned S_WIDTH_DEF = 6;   // S-counter bits
  localparam int unsigned N_LOW       = 32;  // Sel = 0: 32/33 mode
  localparam int unsigned N_HIGH      = 47;  // Sel = 1: 47/48 mode
  localparam int unsigned SEL_BIT     = 5;   // P-word bit that selects the band (weight 32)

  // Prescaler modulus pair selected by the band bit.
  function automatic int unsigned prescaler_n(input logic sel);
    return sel ? N_HIGH : N_LOW;
  endfunction

  // Division ratio of the whole pulse-swallow divider (valid for S <= P).
  function automatic int unsigned division_ratio(input int unsigned p, input int unsigned s,
                                                  input logic sel);
    return prescaler_n(sel) * p + s;
  endfunction
endpackage
