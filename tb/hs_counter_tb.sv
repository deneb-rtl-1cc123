// hs_counter_tb: checks the coarse counter against a cycle count, including the
// wrap-around of a narrow instance and restarts by the synchronous reset.
module hs_counter_tb;
  timeunit 1ns; timeprecision 100fs;
  logic clk = 0, rst_n = 0, sync_rst = 0;
  logic [15:0] q;
  logic [3:0]  q4;
  int checks = 0, failures = 0;
  int unsigned ref_cnt;
  hs_counter #(.W(16)) dut (.clk, .rst_n, .sync_rst, .q);
  hs_counter #(.W(4))  dut4 (.clk, .rst_n, .sync_rst, .q(q4));
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk); @(negedge clk); rst_n = 1; ref_cnt = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (sync_rst) ref_cnt = 0; else ref_cnt++;
      sync_rst = ($urandom % 500) == 0;
      checks++;
      if (q != 16'(ref_cnt) || q4 != 4'(ref_cnt)) begin
        failures++; $display("FAIL q=%0d q4=%0d ref=%0d", q, q4, ref_cnt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
