// cfc_counter_tb: random clear/enable/input streams against a reference count,
// including saturation and the overflow flag on a 4-bit instance.
module cfc_counter_tb;
  timeunit 1ns; timeprecision 100fs;
  logic clk = 0, rst_n = 0, clr = 0, en = 0, pulse = 0;
  logic [3:0] q;
  logic ovf;
  int checks = 0, failures = 0, rq = 0, sat = 0;
  bit rovf = 0;
  cfc_counter #(.W(4)) dut (.clk, .rst_n, .clr, .en, .pulse, .q, .ovf);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk); @(negedge clk); rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      clr = ($urandom % 40) == 0; en = ($urandom % 8) != 0; pulse = $urandom % 2;
      @(posedge clk);
      if (clr) begin rq = int'(pulse); rovf = 0; end
      else if (en && pulse) begin if (rq == 15) begin rovf = 1; sat++; end else rq++; end
      @(negedge clk);
      checks++;
      if (q != 4'(rq) || ovf != rovf) begin failures++; $display("FAIL q=%0d ref=%0d", q, rq); end
    end
    checks++; if (sat == 0) begin failures++; $display("FAIL saturation never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
