// chain_node_tb: a chain of four nodes, each with a random local source, feeding a
// randomly stalling sink. Checks that every word arrives exactly once, that the
// words of each source keep their order, and that no word changes while stalled
// (the node's assertion).
module chain_node_tb;
  timeunit 1ns; timeprecision 1ps;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic [N:0]  v;
  logic [63:0] d [N+1];
  logic [N:0]  r;
  logic        rs;
  bit          fire;
  bit [N-1:0]  lfire;
  logic [63:0] dsnap;
  logic [N-1:0] lv;
  logic [63:0] ld [N];
  logic [N-1:0] lr;
  int sent [N], rcvd [N];
  int checks = 0, failures = 0, total = 0;
  assign v[N] = 1'b0;
  assign r[0] = rs;
  assign d[N] = '0;
  for (genvar i = 0; i < N; i++) begin : g
    chain_node #(.W(64)) u (.clk, .rst_n, .up_valid(v[i+1]), .up_data(d[i+1]), .up_ready(r[i+1]),
      .loc_valid(lv[i]), .loc_data(ld[i]), .loc_ready(lr[i]), .dn_valid(v[i]), .dn_data(d[i]), .dn_ready(r[i]));
  end
  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < N; i++) begin sent[i] = 0; rcvd[i] = 0; ld[i] = 0; end
    lv = '0;
    rs = 0;
    repeat (2) @(posedge clk); @(negedge clk); rst_n = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      for (int i = 0; i < N; i++) begin
        if (!lv[i] && sent[i] < 200 && ($urandom % 4 == 0)) begin
          lv[i] = 1; ld[i] = {32'(i), 32'(sent[i])};
        end
      end
      rs = ($urandom % 3) != 0;
      #1;
      fire = v[0] && rs; dsnap = d[0];
      for (int i = 0; i < N; i++) lfire[i] = lv[i] && lr[i];
      @(posedge clk);
      if (fire) begin
        int s, n;
        s = int'(dsnap[63:32]); n = int'(dsnap[31:0]);
        checks++;
        if (s >= N || n != rcvd[s]) begin failures++; $display("FAIL word %h", dsnap); end
        else rcvd[s]++;
        total++;
      end
      @(negedge clk);
      for (int i = 0; i < N; i++) if (lfire[i]) begin lv[i] = 0; sent[i]++; end
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (rcvd[i] != sent[i] || sent[i] != 200) begin failures++; $display("FAIL source %0d sent %0d rcvd %0d", i, sent[i], rcvd[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
