// tb_band_sweep: exhaustive run of every programming word of both bands.
//
// 2.4 GHz band: P = 75..78, S = 0..31 (N = 32). 5 GHz band: P = 105..123,
// S = 0..47 (N = 47). For each word the divider is reset and one full
// output period is measured against N*P + S input cycles. Every ratio that
// is reached is marked, and at the end each channel from 2400 to 2527 and
// from 5000 to 5825 (1 MHz steps with a 1 MHz reference) must have been
// reached by some word.
`timescale 1ns/1ps
module tb_band_sweep;
  import divider_pkg::*;
  logic       fin = 1'b0, rst = 1'b1, fout, fp, mod;
  logic [6:0] p = 7'd75;
  logic [5:0] s = '0;
  int   checks = 0, failures = 0, configs = 0;
  bit   reached [8192];

  multiband_divider dut (.fin(fin), .rst(rst), .p(p), .s(s), .fout(fout), .fp(fp), .mod(mod));

  always #1 fin = ~fin;

  initial begin
    #40000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input int unsigned pv, input int unsigned sv);
    int unsigned expected;
    int   cyc = 0;
    logic fout_d = 1'b0, seen = 1'b0, done = 1'b0;
    p        = 7'(pv);
    s        = 6'(sv);
    expected = division_ratio(pv, sv, p[SEL_BIT]);
    rst      = 1'b1;
    repeat (2) @(negedge fin);
    rst = 1'b0;
    while (!done) begin
      @(negedge fin);
      cyc++;
      if (fout && !fout_d) begin
        if (seen) begin
          checks++;
          if (cyc != int'(expected)) begin
            failures++;
            $display("P=%0d S=%0d: period %0d, expected %0d", pv, sv, cyc, expected);
          end else begin
            reached[cyc] = 1'b1;
          end
          done = 1'b1;
        end
        seen = 1'b1;
        cyc  = 0;
      end
      fout_d = fout;
    end
    configs++;
  endtask

  task automatic require_channels(input int lo, input int hi);
    int missing = 0;
    for (int r = lo; r <= hi; r++) if (!reached[r]) missing++;
    checks++;
    if (missing != 0) begin
      failures++;
      $display("%0d channels between %0d and %0d never reached", missing, lo, hi);
    end else begin
      $display("all channels %0d..%0d reached", lo, hi);
    end
  endtask

  initial begin
    for (int pv = 75; pv <= 78; pv++)
      for (int sv = 0; sv <= 31; sv++) measure(pv, sv);
    for (int pv = 105; pv <= 123; pv++)
      for (int sv = 0; sv <= 47; sv++) measure(pv, sv);
    require_channels(2400, 2527);
    require_channels(5000, 5825);
    $display("%0d programming words measured", configs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
