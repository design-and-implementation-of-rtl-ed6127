// tb_prescaler_2_3: self-checking test of the 2/3 prescaler.
//
// At every rising edge of fo (seen on the falling clock edge) a new random
// mc is chosen; it is held for the whole period, and the next period must
// last 2 input cycles for mc = 1 and 3 for mc = 0. Also checks that fo is
// high for exactly one input cycle per period.
`timescale 1ns/1ps
module tb_prescaler_2_3;
  logic clk = 1'b0, rst = 1'b1, mc = 1'b1, fo;
  int   checks = 0, failures = 0;
  int   cyc_since_rise = 0, high_cycles = 0, expected = 0, n2 = 0, n3 = 0;
  logic fo_d = 1'b0, seen_rise = 1'b0;

  prescaler_2_3 dut (.clk(clk), .rst(rst), .mc(mc), .fo(fo));

  always #1 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    forever begin
      @(negedge clk);
      cyc_since_rise++;
      if (fo) high_cycles++;
      if (fo && !fo_d) begin
        if (seen_rise) begin
          checks++;
          if (cyc_since_rise != expected) begin
            failures++;
            $display("period %0d, expected %0d", cyc_since_rise, expected);
          end
          checks++;
          if (high_cycles != 2) begin   // one of the previous period + this one
            failures++;
            $display("fo high for %0d cycles", high_cycles - 1);
          end
        end
        seen_rise      = 1'b1;
        cyc_since_rise = 0;
        high_cycles    = 1;
        mc             = 1'($urandom_range(0, 1));
        expected       = mc ? 2 : 3;
        if (mc) n2++; else n3++;
        if (n2 + n3 > 2000) break;
      end
      fo_d = fo;
    end
    checks++;
    if (n2 == 0 || n3 == 0) begin
      failures++;
      $display("a modulus was never exercised");
    end
    $display("divide-by-2 periods %0d, divide-by-3 periods %0d", n2, n3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
