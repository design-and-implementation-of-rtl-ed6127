// tb_multiband_divider: self-checking test of the pulse-swallow divider.
//
// For a set of (P, S) words from both bands plus random ones, the divider
// is reset, programmed and run for several output periods. Each output
// period must last N*P + S input cycles (N = 32 or 47 from bit 5 of P), and
// within it mod must stay 0 for exactly S prescaler periods.
`timescale 1ns/1ps
module tb_multiband_divider;
  import divider_pkg::*;
  logic       fin = 1'b0, rst = 1'b1, fout, fp, mod;
  logic [6:0] p;
  logic [5:0] s;
  int   checks = 0, failures = 0;
  int   cyc, periods, swallow, n_low = 0, n_high = 0;
  logic fout_d, fp_d, seen;

  multiband_divider dut (.fin(fin), .rst(rst), .p(p), .s(s), .fout(fout), .fp(fp), .mod(mod));

  always #1 fin = ~fin;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_config(input int unsigned pv, input int unsigned sv);
    int unsigned expected;
    p        = 7'(pv);
    s        = 6'(sv);
    expected = division_ratio(pv, sv, p[SEL_BIT]);
    rst      = 1'b1;
    repeat (3) @(negedge fin);
    rst     = 1'b0;
    cyc     = 0;
    periods = 0;
    swallow = 0;
    seen    = 1'b0;
    fout_d  = 1'b0;
    fp_d    = 1'b0;
    while (periods < 3) begin
      @(negedge fin);
      cyc++;
      if (fp && !fp_d && !mod) swallow++;
      if (fout && !fout_d) begin
        if (seen) begin
          checks++;
          if (cyc != int'(expected)) begin
            failures++;
            $display("P=%0d S=%0d: period %0d, expected %0d", pv, sv, cyc, expected);
          end
          checks++;
          if (swallow != int'(sv)) begin
            failures++;
            $display("P=%0d S=%0d: %0d swallow periods", pv, sv, swallow);
          end
          periods++;
        end
        seen    = 1'b1;
        cyc     = 0;
        swallow = 0;
      end
      fout_d = fout;
      fp_d   = fp;
    end
    if (p[SEL_BIT]) n_high++; else n_low++;
  endtask

  initial begin
    p = 7'd75;
    s = '0;
    run_config(75, 0);
    run_config(75, 31);
    run_config(78, 17);
    run_config(105, 0);
    run_config(106, 18);     // 5000
    run_config(122, 47);
    run_config(115, 33);
    run_config(123, 44);     // 5825, top of the 5 GHz band
    repeat (5) begin
      automatic int unsigned pv = $urandom_range(75, 78);
      run_config(pv, $urandom_range(0, 31));
      pv = $urandom_range(105, 122);
      run_config(pv, $urandom_range(0, 47));
    end
    checks++;
    if (n_low == 0 || n_high == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
