// tb_loadable_bitcell: self-checking test of the loadable counter bit-cell.
//
// Random ld, hold, t_en and pi every clock; the cell is compared with a
// reference: load has priority, hold (MOD) freezes the cell, otherwise it
// toggles when enabled.
`timescale 1ns/1ps
module tb_loadable_bitcell;
  logic clk = 1'b0, rst = 1'b1, ld = 1'b0, hold = 1'b0, t_en = 1'b0, pi = 1'b0, q;
  logic ref_q = 1'b0;
  int   checks = 0, failures = 0;
  int   n_ld = 0, n_hold = 0, n_tog = 0;

  loadable_bitcell dut (.clk(clk), .rst(rst), .ld(ld), .hold(hold), .t_en(t_en), .pi(pi), .q(q));

  always #1 clk = ~clk;

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    repeat (2000) begin
      @(negedge clk);
      checks++;
      if (q !== ref_q) begin
        failures++;
        $display("q=%0d expected %0d", q, ref_q);
      end
      ld   = ($urandom_range(0, 3) == 0);
      hold = 1'($urandom_range(0, 1));
      t_en = 1'($urandom_range(0, 1));
      pi   = 1'($urandom_range(0, 1));
      if (ld)                 begin ref_q = pi;     n_ld++;   end
      else if (hold)          begin                 n_hold++; end
      else if (t_en)          begin ref_q = ~ref_q; n_tog++;  end
    end
    checks++;
    if (n_ld == 0 || n_hold == 0 || n_tog == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
