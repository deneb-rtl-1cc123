// eoc_sram_tb: writes random words to random addresses of the full 2048 x 64
// memory, reading in parallel, and checks read data (one-cycle latency, old data
// on a same-address read) against a model array.
module eoc_sram_tb;
  timeunit 1ns; timeprecision 100fs;
  logic clk = 0, we = 0, re = 0;
  logic [10:0] waddr = 0, raddr = 0;
  logic [63:0] wdata = 0, rdata;
  logic [63:0] model [2048];
  bit   known [2048];
  int checks = 0, failures = 0;
  eoc_sram #(.DEPTH(2048), .W(64)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [63:0] exp_d; bit exp_k;
    for (int i = 0; i < 2048; i++) known[i] = 0;
    @(negedge clk);
    for (int it = 0; it < 20000; it++) begin
      we = $urandom % 2; waddr = 11'($urandom); wdata = {$urandom, $urandom};
      re = $urandom % 2; raddr = (it % 7 == 0) ? waddr : 11'($urandom);
      exp_d = model[raddr]; exp_k = known[raddr];
      @(posedge clk);
      if (we) begin model[waddr] = wdata; known[waddr] = 1; end
      @(negedge clk);
      if (re && exp_k) begin
        checks++;
        if (rdata != exp_d) begin failures++; $display("FAIL addr %0d", raddr); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
