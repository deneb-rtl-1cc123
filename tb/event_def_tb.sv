// event_def_tb: directed scenarios for the event definition: latency from the
// asynchronous crossing to ev_start (3 clock edges), window length of a single
// pulse, merging of two pulses closer than the extension, separation of pulses
// further apart, hold-off veto, acquisition-window veto, pixel mask and forced
// test strobe. Expected values are worked out from the pulse timing.
module event_def_tb;
  timeunit 1ns; timeprecision 100fs;
  logic clk = 0, rst_n = 0, disc = 0, enable = 1, force_en = 0, strobe = 0, acq = 1;
  logic [7:0] ext = 0, hold = 0;
  logic disc_eff, lo_sync, arm_ok, ev_start, ev_end, ev_open, merged;
  logic [12:0] win_len;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  int n_start = 0, n_end = 0, c_start, c_end, last_merged, last_win;
  event_def dut (.clk, .rst_n, .disc_lo(disc), .enable, .force_en, .test_strobe(strobe), .acq_en(acq),
    .ext, .holdoff(hold), .disc_eff, .lo_sync, .arm_ok, .ev_start, .ev_end, .ev_open, .merged, .win_len);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && ev_start) begin n_start++; c_start = int'(cyc); end
    if (rst_n && ev_end)   begin n_end++;   c_end = int'(cyc); last_merged = int'(merged); last_win = int'(win_len); end
  end
  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  // pulse rising 2 ns after a rising edge, lasting `len` cycles
  task automatic pulse(int len);
    int c0;
    @(posedge clk); #2; disc = 1; c0 = int'(cyc);
    repeat (len) @(posedge clk);
    #2 disc = 0;
  endtask
  task automatic settle(); repeat (40) @(posedge clk); endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int c_rise, ns0, ne0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    // a) single pulse of 10 cycles, no extension
    @(posedge clk); #2 disc = 1; c_rise = int'(cyc);
    repeat (10) @(posedge clk); #2 disc = 0;
    settle();
    chk(n_start == 1 && n_end == 1, $sformatf("single pulse: %0d %0d", n_start, n_end));
    chk(c_start == c_rise + 3, $sformatf("start latency %0d", c_start - c_rise));
    chk(c_end - c_start == 10, $sformatf("window length %0d", c_end - c_start));
    chk(last_win == 10 && last_merged == 0, $sformatf("win_len %0d", last_win));
    // b) two pulses 6 cycles apart with extension 10: merged
    ext = 10; ns0 = n_start; ne0 = n_end;
    pulse(4); repeat (6) @(posedge clk); pulse(4); settle();
    chk(n_start - ns0 == 1 && n_end - ne0 == 1 && last_merged == 1, "merged pulses");
    chk(last_win == 4 + 6 + 1 + 4 + 10, $sformatf("merged window %0d", last_win));
    // c) same pulses with extension 3: two events
    ext = 3; ns0 = n_start;
    pulse(4); repeat (6) @(posedge clk); pulse(4); settle();
    chk(n_start - ns0 == 2 && last_merged == 0, "separate pulses");
    // d) hold-off 20: a pulse 8 cycles after the end is vetoed, one 30 cycles after is not
    ext = 0; hold = 20; ns0 = n_start;
    pulse(3); repeat (8) @(posedge clk); pulse(3); settle();
    chk(n_start - ns0 == 1, "hold-off veto");
    ns0 = n_start;
    pulse(3); repeat (30) @(posedge clk); pulse(3); settle();
    chk(n_start - ns0 == 2, "after hold-off");
    hold = 0;
    // e) acquisition window closed
    acq = 0; ns0 = n_start; @(posedge clk); #1;
    chk(!arm_ok, "arm_ok low while vetoed");
    pulse(3); settle();
    chk(n_start == ns0, "acquisition veto");
    acq = 1;
    // f) masked pixel, then forced strobe
    enable = 0; pulse(3); settle();
    chk(n_start == ns0 && !disc_eff, "masked pixel");
    enable = 1; force_en = 1;
    @(posedge clk); #2 strobe = 1; repeat (5) @(posedge clk); #2 strobe = 0; settle();
    chk(n_start == ns0 + 1 && last_win == 5, "forced event");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
