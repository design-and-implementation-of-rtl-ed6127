// tb_p_counter: self-checking test of the programmable P-counter.
//
// For random P values in 2..127 the counter must raise ld for exactly one
// clock in every P clocks, and its count must run P, P-1, ..., 1. P is
// changed only while ld is high, as the divider's programming would be.
`timescale 1ns/1ps
module tb_p_counter;
  import divider_pkg::*;
  localparam int W = P_WIDTH_DEF;
  logic         clk = 1'b0, rst = 1'b1, ld;
  logic [W-1:0] p = 7'd75, count, p_cur;
  int   checks = 0, failures = 0, since_ld = 0, periods = 0;
  logic started = 1'b0;

  p_counter #(.P_WIDTH(W)) dut (.clk(clk), .rst(rst), .p(p), .ld(ld), .count(count));

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
    while (periods < 600) begin
      @(negedge clk);
      since_ld++;
      if (started) begin
        checks++;
        if (count != W'(int'(p_cur) - since_ld + 1)) begin
          failures++;
          $display("count %0d, expected %0d", count, int'(p_cur) - since_ld + 1);
        end
      end
      if (ld) begin
        if (started) begin
          checks++;
          if (since_ld != int'(p_cur)) begin
            failures++;
            $display("P=%0d: ld period %0d", p_cur, since_ld);
          end
        end
        started  = 1'b1;
        since_ld = 0;
        p        = W'($urandom_range(2, (1 << W) - 1));
        if (periods % 50 == 0) p = 7'd2;
        p_cur    = p;
        periods++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
