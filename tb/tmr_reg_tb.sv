// tmr_reg_tb: writes random words into the triple-redundant register, upsets one
// copy at a time and checks that the voted output never changes, that the
// disagreement flag rises for exactly the cycle after the upset, and that the
// copies are scrubbed back into agreement.
module tmr_reg_tb;
  timeunit 1ns; timeprecision 100fs;
  logic clk = 0, rst_n = 0, we = 0, err;
  logic [31:0] d = 0, q;
  logic [2:0] seu = 0;
  int checks = 0, failures = 0;
  tmr_reg #(.WIDTH(32)) dut (.clk, .rst_n, .we, .d, .seu_inj(seu), .q, .err);
  always #5 clk = ~clk;
  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [31:0] v;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int it = 0; it < 50; it++) begin
      v = $urandom;
      @(negedge clk); we = 1; d = v;
      @(negedge clk); we = 0; d = ~v;
      chk(q == v && !err, "write");
      for (int k = 0; k < 3; k++) begin
        seu = 3'b001 << k;
        @(negedge clk); seu = 0;
        chk(q == v, "voted value after upset");
        chk(err, "error flag after upset");
        @(negedge clk);
        chk(q == v && !err, "scrubbed");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
