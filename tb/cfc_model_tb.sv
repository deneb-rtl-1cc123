// cfc_model_tb: feeds the charge-branch model with random current waveforms
// (quiet periods and bursts) and checks charge conservation: after each window
// the pulse count times QREF equals the integrated input minus what is still in
// the integrator, i.e. count == floor(total / QREF) within one quantum.
module cfc_model_tb;
  timeunit 1ns; timeprecision 100fs;
  localparam int QREF = 64;
  logic clk = 0, rst_n = 0, pulse;
  logic [7:0] i_in = 0;
  int checks = 0, failures = 0;
  cfc_model #(.QREF(QREF)) dut (.clk, .rst_n, .i_in, .pulse);
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    longint total, cnt;
    repeat (2) @(posedge clk); @(negedge clk); rst_n = 1;
    total = 0; cnt = 0;
    for (int w = 0; w < 40; w++) begin
      for (int i = 0; i < 500; i++) begin
        i_in = (i < 50) ? 8'($urandom % 64) : 8'($urandom % 4);
        @(posedge clk); total += i_in;
        @(negedge clk); if (pulse) cnt++;
      end
      i_in = 0;
      repeat (20) begin @(posedge clk); @(negedge clk); if (pulse) cnt++; end
      checks++;
      if (cnt != total / QREF) begin
        failures++; $display("FAIL window %0d count %0d expected %0d", w, cnt, total / QREF);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
