// tb_divided64: self-checking test of the divide-by-64/80 chain.
//
// For mc = 0 and mc = 1 (each after a reset) f must have a period of 64 or
// 80 clk cycles with a 50% duty cycle, over several periods.
`timescale 1ns/1ps
module tb_divided64;
  logic clk = 1'b0, rst = 1'b1, mc = 1'b0, f;
  int   checks = 0, failures = 0, n64 = 0, n80 = 0;

  divided64 dut (.clk(clk), .rst(rst), .mc(mc), .f(f));

  always #1 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_mode(input logic m);
    int   cyc = 0, high = 0, periods = 0, expected;
    logic f_d = 1'b0, seen = 1'b0;
    expected = m ? 80 : 64;
    mc  = m;
    rst = 1'b1;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    while (periods < 5) begin
      @(negedge clk);
      cyc++;
      if (f && !f_d) begin
        if (seen) begin
          checks += 2;
          if (cyc != expected) begin
            failures++;
            $display("mc=%0d: period %0d, expected %0d", m, cyc, expected);
          end
          if (high != expected / 2) begin
            failures++;
            $display("mc=%0d: high for %0d", m, high);
          end
          periods++;
          if (m) n80++; else n64++;
        end
        seen = 1'b1;
        cyc  = 0;
        high = 0;
      end
      if (f) high++;
      f_d = f;
    end
  endtask

  initial begin
    run_mode(1'b0);
    run_mode(1'b1);
    run_mode(1'b0);
    checks++;
    if (n64 == 0 || n80 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
