// tb_sr_flipflop: self-checking test of the clocked SR flip-flop.
//
// Random s and r each clock, compared with a reference (set, reset, hold,
// and toggle for s = r = 1); qb must always be the complement of q.
`timescale 1ns/1ps
module tb_sr_flipflop;
  logic clk = 1'b0, rst = 1'b1, s = 1'b0, r = 1'b0, q, qb;
  logic ref_q = 1'b0;
  int   checks = 0, failures = 0;
  int   seen [4];

  sr_flipflop dut (.clk(clk), .rst(rst), .s(s), .r(r), .q(q), .qb(qb));

  always #1 clk = ~clk;

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '{default: 0};
    repeat (2) @(negedge clk);
    rst = 1'b0;
    repeat (2000) begin
      @(negedge clk);
      checks += 2;
      if (q !== ref_q) begin
        failures++;
        $display("q=%0d expected %0d", q, ref_q);
      end
      if (qb !== ~q) failures++;
      s = 1'($urandom_range(0, 1));
      r = 1'($urandom_range(0, 1));
      seen[{s, r}]++;
      case ({s, r})
        2'b10:   ref_q = 1'b1;
        2'b01:   ref_q = 1'b0;
        2'b11:   ref_q = ~ref_q;
        default: ;
      endcase
    end
    foreach (seen[i]) begin
      checks++;
      if (seen[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
