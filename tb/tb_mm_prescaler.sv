// tb_mm_prescaler: self-checking test of the 32/33/47/48 prescaler.
//
// At every rising edge of fp a random (sel, mod) pair is applied, as the
// S-counter and the band select would; the period that follows must last
// 33/32 input cycles (sel = 0, mod = 0/1) or 48/47 (sel = 1, mod = 0/1).
`timescale 1ns/1ps
module tb_mm_prescaler;
  import divider_pkg::*;
  logic fin = 1'b0, rst = 1'b1, mod = 1'b0, sel = 1'b0, fp;
  int   checks = 0, failures = 0;
  int   cyc = 0, expected = 0, periods = 0;
  int   hits [4];
  logic fp_d = 1'b0, seen_rise = 1'b0;

  mm_prescaler dut (.fin(fin), .rst(rst), .mod(mod), .sel(sel), .fp(fp));

  always #1 fin = ~fin;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hits = '{default: 0};
    repeat (3) @(negedge fin);
    rst = 1'b0;
    while (periods < 1500) begin
      @(negedge fin);
      cyc++;
      if (fp && !fp_d) begin
        if (seen_rise) begin
          checks++;
          if (cyc != expected) begin
            failures++;
            $display("sel=%0d mod=%0d: period %0d, expected %0d", sel, mod, cyc, expected);
          end
        end
        seen_rise = 1'b1;
        cyc       = 0;
        sel       = 1'($urandom_range(0, 1));
        mod       = 1'($urandom_range(0, 1));
        expected  = prescaler_n(sel) + (mod ? 0 : 1);
        hits[{sel, mod}]++;
        periods++;
      end
      fp_d = fp;
    end
    foreach (hits[i]) begin
      checks++;
      if (hits[i] == 0) begin
        failures++;
        $display("mode %0d never exercised", i);
      end
    end
    $display("periods: 33:%0d 32:%0d 48:%0d 47:%0d", hits[0], hits[1], hits[2], hits[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
