// tb_prescaler_4_5: self-checking test of the 4/5 prescaler.
//
// A random mc is chosen at each rising edge of f and held for the period;
// the period must last 4 input cycles for mc = 0 and 5 for mc = 1, with f
// high for 2 of them.
`timescale 1ns/1ps
module tb_prescaler_4_5;
  logic clk = 1'b0, rst = 1'b1, mc = 1'b0, f;
  int   checks = 0, failures = 0, cyc = 0, high = 0, expected = 0, n4 = 0, n5 = 0;
  logic f_d = 1'b0, seen = 1'b0;

  prescaler_4_5 dut (.clk(clk), .rst(rst), .mc(mc), .f(f));

  always #1 clk = ~clk;

  initial begin
    #40000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    while (n4 + n5 < 2000) begin
      @(negedge clk);
      cyc++;
      if (f && !f_d) begin
        if (seen) begin
          checks += 2;
          if (cyc != expected) begin
            failures++;
            $display("mc=%0d: period %0d", mc, cyc);
          end
          if (high != 2) begin
            failures++;
            $display("f high for %0d cycles", high);
          end
        end
        seen = 1'b1;
        cyc  = 0;
        high = 0;
        mc   = 1'($urandom_range(0, 1));
        expected = mc ? 5 : 4;
        if (mc) n5++; else n4++;
      end
      if (f) high++;
      f_d = f;
    end
    checks++;
    if (n4 == 0 || n5 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
