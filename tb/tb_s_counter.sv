// tb_s_counter: self-checking test of the swallow counter and MOD.
//
// ld is pulsed every L clocks (L random, larger than the programmed S).
// After each reload mod must stay 0 for exactly S clocks and then stay 1
// until the next reload, and while mod = 1 the count must not change (the
// idle, power-saving state of the bit-cells).
`timescale 1ns/1ps
module tb_s_counter;
  import divider_pkg::*;
  localparam int W = S_WIDTH_DEF;
  logic         clk = 1'b0, rst = 1'b1, ld = 1'b0, mod, mod_d;
  logic [W-1:0] s = '0, count, s_cur, count_d;
  int   checks = 0, failures = 0, zeros = 0, idle_clocks = 0, s_zero_runs = 0;
  int   len;

  s_counter #(.S_WIDTH(W)) dut (.clk(clk), .rst(rst), .ld(ld), .s(s), .mod(mod), .count(count));

  always #1 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    repeat (500) begin
      s     = W'($urandom_range(0, (1 << W) - 1));
      if ($urandom_range(0, 9) == 0) s = '0;
      s_cur = s;
      len   = int'(s) + $urandom_range(1, 20);
      ld    = 1'b1;
      @(negedge clk);
      ld      = 1'b0;
      s       = W'($urandom);          // programming word may change meanwhile
      zeros   = 0;
      count_d = count;
      for (int i = 0; i < len; i++) begin
        if (!mod) zeros++;
        checks++;
        if (mod != (i >= int'(s_cur))) begin
          failures++;
          $display("S=%0d clock %0d: mod=%0d", s_cur, i, mod);
        end
        mod_d = mod;
        @(negedge clk);
        if (mod_d) checks++;
        if (mod_d && count_d != count) begin
          failures++;
          $display("count moved while idle");
        end
        if (mod_d) idle_clocks++;
        count_d = count;
      end
      checks++;
      if (zeros != int'(s_cur)) begin
        failures++;
        $display("S=%0d: mod low for %0d clocks", s_cur, zeros);
      end
      if (s_cur == 0) s_zero_runs++;
    end
    checks++;
    if (idle_clocks == 0 || s_zero_runs == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
