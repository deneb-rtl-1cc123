// eoc_capacity_tb: capacity of one end-of-column buffer at its default size.
//
// A column must be able to buffer about 1024 events of two 64-bit words (timing
// and charge), i.e. 2048 words, before its chain stalls. This test fills the
// default-size buffer from the column side with two-word events while the link
// side takes nothing, until the token is withdrawn. It checks that at least 1024
// events fit (the SRAM's 2048 words plus the one word in the output register),
// that the buffer then stalls the column, and that it accepts no further word.
// It then drains the buffer at the highest rate the read side offers, checks
// every word and its order, and that the buffer takes words again afterwards.
module eoc_capacity_tb;
  timeunit 1ns; timeprecision 100fs;
  import deneb_pkg::*;
  localparam int DEPTH = 2048;        // eoc_ctrl default
  localparam int N_EVENTS = DEPTH / 2;

  logic clk = 0, rst_n = 0, sclk = 0, cs_n = 1, sdi = 0, sdo, acq_en = 1, col_acq_en;
  logic [7:0] dll_trim;
  logic col_valid = 0, col_ready, out_valid, out_pop = 0, stall;
  word_t col_data = '0, out_data;
  logic [$clog2(DEPTH):0] level;
  int checks = 0, failures = 0, n_stall = 0;

  eoc_ctrl dut (.*);

  always #1.5625 clk = ~clk;
  always @(posedge clk) if (rst_n) n_stall += int'(stall);

  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // word k of the stream: event k/2, timing word (even k) or charge word (odd k)
  function automatic word_t w_of(int k);
    return {1'(k % 2), 10'(k / 2), 16'(k * 7), 37'(k)};
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int k, cyc, t_full;
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (2) @(negedge clk);
    // fill: one word per cycle while the token is present
    k = 0; cyc = 0;
    while (cyc < 4 * DEPTH) begin
      @(negedge clk);
      col_valid = 1; col_data = w_of(k);
      @(posedge clk);
      if (col_ready) k++;
      else break;
      cyc++;
    end
    chk(k == 2 * N_EVENTS + 1, $sformatf("%0d words accepted, expected SRAM depth + output register", k));
    chk(cyc == k, "one word accepted per cycle until full");
    repeat (4) @(negedge clk);
    chk(int'(level) == DEPTH, $sformatf("level %0d after filling", level));
    chk(!col_ready, "buffer full: token withdrawn");
    // the next word waits and stalls
    col_valid = 1; col_data = w_of(k);
    t_full = n_stall;
    repeat (20) @(negedge clk);
    chk(n_stall - t_full >= 19, "column stalls while the buffer is full");
    chk(int'(level) == DEPTH, "no word accepted while full");
    col_valid = 0;
    // drain at full speed, checking order and contents
    for (int j = 0; j < k; j++) begin
      int guard;
      guard = 0;
      @(negedge clk);
      while (!out_valid && guard < 8) begin @(negedge clk); guard++; end
      chk(out_valid && out_data == w_of(j), $sformatf("word %0d", j));
      out_pop = 1; @(negedge clk); out_pop = 0;
    end
    repeat (6) @(negedge clk);
    chk(!out_valid && level == 0, "buffer empty after the drain");
    chk(col_ready, "token back after the drain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
