// sync_fifo_tb: random pushes (only when not full) and pops against a queue
// model; checks order, data, count and the full/empty flags.
module sync_fifo_tb;
  timeunit 1ns; timeprecision 100fs;
  logic clk = 0, rst_n = 0, push = 0, pop = 0, empty, full;
  logic [63:0] wdata = 0, rdata;
  logic [2:0] count;
  logic [63:0] q[$];
  int checks = 0, failures = 0, nfull = 0;
  sync_fifo #(.DEPTH(4), .W(64)) dut (.clk, .rst_n, .push, .wdata, .pop, .rdata, .empty, .full, .count);
  always #5 clk = ~clk;
  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk); @(negedge clk); rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      chk(count == 3'(q.size()), "count");
      chk(empty == (q.size() == 0) && full == (q.size() == 4), "flags");
      if (q.size() > 0) chk(rdata == q[0], "data");
      if (full) nfull++;
      push = !full && ($urandom % 3 != 0) && (i < 3900);
      pop  = !empty && ($urandom % 3 == 0);
      wdata = {$urandom, $urandom};
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(wdata);
      @(negedge clk);
    end
    chk(nfull > 0, "FIFO reached full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
