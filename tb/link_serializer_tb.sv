// link_serializer_tb: a receiver in the testbench rebuilds frames from the
// serial output, in SDR (one bit per clock) and in DDR (two bits per clock),
// using the 2-bit headers. Checks that every offered word comes out once and in
// order, that idle frames fill gaps, that a frame lasts 66 clocks in SDR and 33
// in DDR, and that an inactive link is silent.
module link_serializer_tb;
  timeunit 1ns; timeprecision 100fs;
  import deneb_pkg::*;
  logic clk = 0, rst_n = 0, active = 0, ddr = 0, valid = 0, take, oe;
  word_t data = 0;
  logic [1:0] sout;
  word_t sent[$];
  int checks = 0, failures = 0, n_idle = 0, n_data = 0;
  link_serializer dut (.*);
  always #5 clk = ~clk;
  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  // receiver: collect bits while oe, split into 66-bit frames
  logic [65:0] fr; int nb = 0, fcyc = 0, last_frame_cyc = -1; int unsigned cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && oe) begin
      if (ddr_seen) begin fr = {fr[63:0], sout}; nb += 2; end
      else          begin fr = {fr[64:0], sout[1]}; nb += 1; end
      if (nb == 66) begin
        nb = 0;
        if (last_frame_cyc >= 0)
          chk(int'(cyc) - last_frame_cyc == (ddr_seen ? 33 : 66), $sformatf("frame period %0d", int'(cyc) - last_frame_cyc));
        last_frame_cyc = int'(cyc);
        if (fr[65:64] == HDR_DATA) begin
          n_data++;
          chk(sent.size() > 0 && fr[63:0] == sent[0], "data frame payload");
          if (sent.size() > 0) void'(sent.pop_front());
        end else begin
          chk(fr[65:64] == HDR_IDLE && fr[63:0] == '0, "idle frame");
          n_idle++;
        end
      end
    end else begin
      nb = 0; last_frame_cyc = -1;
    end
  end
  bit ddr_seen;
  always @(posedge clk) if (take || !oe) ddr_seen <= ddr;
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    repeat (5) begin @(negedge clk); chk(!oe && sout == 0, "inactive link silent"); end
    for (int m = 0; m < 2; m++) begin
      ddr = m[0]; active = 1;
      for (int it = 0; it < 15; it++) begin
        if ($urandom % 4 == 0) repeat (100) @(negedge clk);   // gap: idle frames
        valid = 1; data = {$urandom, $urandom};
        #1;
        while (!take) begin @(negedge clk); #1; end
        sent.push_back(data);
        @(negedge clk); valid = 0;
      end
      valid = 0;
      repeat (300) @(negedge clk);
      chk(sent.size() == 0, "all words sent");
      active = 0; repeat (3) @(negedge clk);
    end
    chk(n_idle > 0 && n_data > 10, $sformatf("data %0d idle %0d", n_data, n_idle));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
