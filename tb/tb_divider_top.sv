// tb_divider_top: end-to-end test of both dividers at their default sizes.
//
// The multiband divider is programmed with words from the 2.4 GHz band
// (N = 32) and the 5 GHz band (N = 47), including S = 0 and the largest S,
// and every output period is checked against N*P + S input cycles. The
// divide-by-64/80 chain runs at the same time from its own clock, with mc
// chosen at each reset, and every period of f is checked against 64 or 80.
// The mechanisms of the design are counted and each must occur:
// N+1 prescaler periods (mod = 0), N periods with the S-counter idle
// (mod = 1), P-counter reloads, both bands, a configuration without
// swallowing (S = 0), and both moduli of the 4/5 prescaler.
`timescale 1ns/1ps
module tb_divider_top;
  import divider_pkg::*;
  logic       fin = 1'b0, clk = 1'b0, rst = 1'b1, mc = 1'b0;
  logic [6:0] p_word = 7'd75;
  logic [5:0] s_word = '0;
  logic       fout, fp, mod_o, f;
  int   checks = 0, failures = 0;

  // mechanism counters
  int n_swallow = 0, n_idle = 0, n_reload = 0, n_low = 0, n_high = 0, n_s0 = 0;
  int n_div64 = 0, n_div80 = 0;

  divider_top dut (.rst(rst), .fin(fin), .p_word(p_word), .s_word(s_word),
                   .fout(fout), .fp(fp), .mod_o(mod_o), .clk(clk), .mc(mc), .f(f));

  always #1   fin = ~fin;
  always #1.3 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Divide-by-64/80 monitor, restarted by every reset.
  int   f_cyc, f_high;
  logic f_d, f_seen;
  always @(negedge clk) begin
    if (rst) begin
      f_cyc  = 0;
      f_high = 0;
      f_d    = 1'b0;
      f_seen = 1'b0;
    end else begin
      f_cyc++;
      if (f && !f_d) begin
        if (f_seen) begin
          checks += 2;
          if (f_cyc != (mc ? 80 : 64)) begin
            failures++;
            $display("mc=%0d: f period %0d", mc, f_cyc);
          end
          if (f_high != f_cyc / 2) begin
            failures++;
            $display("mc=%0d: f high for %0d", mc, f_high);
          end
          if (mc) n_div80++; else n_div64++;
        end
        f_seen = 1'b1;
        f_cyc  = 0;
        f_high = 0;
      end
      if (f) f_high++;
      f_d = f;
    end
  end

  task automatic run_config(input int unsigned pv, input int unsigned sv, input logic m);
    int unsigned expected;
    int   cyc = 0, periods = 0, swallow = 0;
    logic fout_d = 1'b0, fp_d = 1'b0, seen = 1'b0;
    p_word   = 7'(pv);
    s_word   = 6'(sv);
    mc       = m;
    expected = division_ratio(pv, sv, p_word[SEL_BIT]);
    rst      = 1'b1;
    repeat (4) @(negedge fin);
    rst = 1'b0;
    while (periods < 3) begin
      @(negedge fin);
      cyc++;
      if (fp && !fp_d) begin
        if (mod_o) n_idle++;
        else begin
          swallow++;
          n_swallow++;
        end
      end
      if (fout && !fout_d) begin
        n_reload++;
        if (seen) begin
          checks += 2;
          if (cyc != int'(expected)) begin
            failures++;
            $display("P=%0d S=%0d: period %0d, expected %0d", pv, sv, cyc, expected);
          end
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
    if (p_word[SEL_BIT]) n_high++; else n_low++;
    if (sv == 0) n_s0++;
    $display("P=%0d S=%0d: divide by %0d checked", pv, sv, expected);
  endtask

  task automatic expect_seen(input string what, input int n);
    checks++;
    $display("%-28s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("  never happened");
    end
  endtask

  initial begin
    run_config(75, 0, 1'b0);     // 2400
    run_config(78, 31, 1'b1);    // 2527
    run_config(106, 18, 1'b0);   // 5000
    run_config(122, 47, 1'b1);   // 5781
    run_config($urandom_range(75, 78), $urandom_range(1, 31), 1'b0);
    run_config($urandom_range(105, 122), $urandom_range(1, 47), 1'b1);
    expect_seen("N+1 prescaler periods", n_swallow);
    expect_seen("N periods, S-counter idle", n_idle);
    expect_seen("P-counter reloads", n_reload);
    expect_seen("2.4 GHz band configs", n_low);
    expect_seen("5 GHz band configs", n_high);
    expect_seen("configs with S = 0", n_s0);
    expect_seen("divide-by-64 periods", n_div64);
    expect_seen("divide-by-80 periods", n_div80);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
