// data_formatter_tb: offers random completed events and checks every field of
// the timing and charge words (including the slew-rate field with and without a
// high-threshold crossing and its saturation), that charge words are dropped in
// timing-only mode, that nothing is pushed without room in the FIFO, and that an
// event takes two cycles with charge and one without.
module data_formatter_tb;
  timeunit 1ns; timeprecision 100fs;
  import deneb_pkg::*;
  logic clk = 0, rst_n = 0, timing_only = 0, res_valid = 0, hi_valid = 0, tot_ovf = 0, chg_ovf = 0, merged = 0;
  logic [9:0] addr = 0;
  logic [15:0] coarse_lo = 0, coarse_hi = 0, charge = 0;
  logic [7:0] fine_lo = 0, fine_hi = 0;
  logic [12:0] tot = 0, win_len = 0;
  logic [2:0] fifo_free = 4;
  logic res_ack, push;
  word_t wdata;
  int checks = 0, failures = 0;
  data_formatter #(.FIFO_AW(2)) dut (.*);
  always #5 clk = ~clk;
  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    word_t got [$];
    int cycles, dco;
    repeat (2) @(posedge clk); @(negedge clk); rst_n = 1;
    for (int it = 0; it < 400; it++) begin
      timing_only = ($urandom % 3) == 0;
      addr = 10'($urandom); coarse_lo = 16'($urandom); fine_lo = 8'($urandom);
      hi_valid = $urandom % 2; dco = ($urandom % 4 == 0) ? 300 : int'($urandom % 200);
      coarse_hi = coarse_lo + 16'(dco); fine_hi = 8'($urandom);
      tot = 13'($urandom); tot_ovf = $urandom; charge = 16'($urandom); chg_ovf = $urandom;
      win_len = 13'($urandom); merged = $urandom;
      // first hold the event back with too little room
      fifo_free = timing_only ? 3'd0 : 3'd1;
      res_valid = 1;
      repeat (3) begin #1; chk(!push && !res_ack, "no push without room"); @(negedge clk); end
      fifo_free = 3'd2 + 3'($urandom % 3);
      got.delete(); cycles = 0;
      do begin
        #1; cycles++;
        if (push) got.push_back(wdata);
        if (res_ack) break;
        @(negedge clk);
      end while (cycles < 10);
      @(negedge clk); res_valid = 0;
      chk(cycles == (timing_only ? 1 : 2), $sformatf("cycles per event %0d", cycles));
      chk(got.size() == (timing_only ? 1 : 2), "word count");
      if (got.size() >= 1) begin
        word_t w; w = got[0];
        chk(w[63] == 0 && w[62:53] == addr && w[52:37] == coarse_lo && w[36:29] == fine_lo, "timing word header");
        chk(w[28:21] == (hi_valid ? fine_hi : 8'd0), "fine hi");
        chk(w[20:13] == (!hi_valid ? 8'hFF : dco >= 255 ? 8'hFE : 8'(dco)), "slew-rate coarse");
        chk(w[12:0] == tot, "tot");
      end
      if (got.size() == 2) begin
        word_t w; w = got[1];
        chk(w[63] == 1 && w[62:53] == addr && w[52:37] == coarse_lo, "charge word header");
        chk(w[36:21] == charge && w[20:8] == win_len, "charge and window");
        chk(w[7:0] == {chg_ovf, tot_ovf, merged, 5'd0}, "flags");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
