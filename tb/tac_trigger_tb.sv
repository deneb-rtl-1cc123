// tac_trigger_tb: the TDC steering logic with four TDC models and the event
// definition, driven by asynchronous discriminator edges at random sub-clock
// offsets. For every event it checks the fine codes and coarse times of both
// thresholds against values computed from the edge times, that results come out
// in event order, that a third event arriving while both TDC pairs are busy is
// counted as lost, that an event without a high-threshold crossing reports none,
// and that pairs are reused after read-out.
module tac_trigger_tb;
  timeunit 1ns; timeprecision 100fs;
  import deneb_pkg::*;
  localparam real TCLK = 3.125;
  localparam real LSB  = TCLK / 128.0;
  logic clk = 0, rst_n = 0, disc_lo = 0, disc_hi = 0;
  logic disc_eff, lo_sync, arm_ok, ev_start, ev_end, ev_open, merged;
  logic [12:0] win_len;
  logic [15:0] coarse = 0;
  logic [3:0] start, busy, stop, valid;
  logic [7:0] code [4];
  logic took, lost, cur_pair, res_valid, res_pair, res_hi_valid, res_ack = 0;
  logic [15:0] res_coarse_lo, res_coarse_hi;
  logic [7:0] res_fine_lo, res_fine_hi;
  int checks = 0, failures = 0, n_lost = 0, n_took = 0;

  event_def u_ev (.clk, .rst_n, .disc_lo, .enable(1'b1), .force_en(1'b0), .test_strobe(1'b0), .acq_en(1'b1),
    .ext(8'd0), .holdoff(8'd0), .disc_eff, .lo_sync, .arm_ok, .ev_start, .ev_end, .ev_open, .merged, .win_len);
  tac_trigger dut (.clk, .rst_n, .disc_lo(disc_eff), .disc_hi, .arm_ok, .ev_start, .ev_end, .coarse,
    .tdc_start(start), .tdc_busy(busy), .tdc_stop(stop), .tdc_valid(valid), .tdc_code(code),
    .took, .lost, .cur_pair, .res_valid, .res_pair, .res_coarse_lo, .res_fine_lo, .res_hi_valid,
    .res_coarse_hi, .res_fine_hi, .res_ack);
  for (genvar i = 0; i < 4; i++) begin : g
    tdc_tac_model #(.FINE_W(8), .CONV_CYCLES(16)) u (.clk, .rst_n, .start(start[i]), .busy(busy[i]),
      .stop(stop[i]), .valid(valid[i]), .code(code[i]));
  end
  always #(TCLK/2) clk = ~clk;
  always @(posedge clk) coarse <= coarse + 1'b1;   // after edge k it holds k+1
  always @(posedge clk) if (rst_n) begin n_lost += int'(lost); n_took += int'(took); end

  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // expected measurement of an edge at time t: {coarse, fine}
  function automatic void expect_of(realtime t, output int c, output int f);
    real s;
    s = $ceil((t + TCLK/2) / TCLK - 0.5 - 0.0001);       // index of stop edge (edge k at (k+0.5)T)
    f = int'($floor(((s + 0.5) * TCLK - t) / LSB + 0.0005));
    c = int'(s) + 1;
  endfunction

  typedef struct { int c_lo, f_lo, c_hi, f_hi; bit hi; } exp_t;
  exp_t q[$];

  // one event: low crossing at a random offset, optional high crossing 0.4-1.2 ns later
  task automatic event_at(bit with_hi, int len_cycles, bit expect_kept);
    exp_t e; realtime t;
    @(posedge clk); #(real'($urandom % 3000) / 1000.0);
    t = $realtime; disc_lo = 1;
    expect_of(t, e.c_lo, e.f_lo);
    e.hi = with_hi;
    if (with_hi) begin
      #(0.4 + real'($urandom % 800) / 1000.0);
      t = $realtime; disc_hi = 1; expect_of(t, e.c_hi, e.f_hi);
    end
    repeat (len_cycles) @(posedge clk);
    #1 disc_hi = 0; #0.2 disc_lo = 0;
    if (expect_kept) q.push_back(e);
  endtask

  // read-out: acknowledge each result and compare with the oldest expectation
  initial begin
    forever begin
      @(negedge clk);
      res_ack = 0;
      if (rst_n && res_valid) begin
        exp_t e;
        if (q.size() == 0) begin chk(0, "unexpected result"); end
        else begin
          e = q.pop_front();
          chk(int'(res_coarse_lo) == e.c_lo, $sformatf("coarse lo %0d exp %0d", res_coarse_lo, e.c_lo));
          chk(int'(res_fine_lo) == e.f_lo, $sformatf("fine lo %0d exp %0d", res_fine_lo, e.f_lo));
          chk(res_hi_valid == e.hi, "high threshold presence");
          if (e.hi) begin
            chk(int'(res_coarse_hi) == e.c_hi, $sformatf("coarse hi %0d exp %0d", res_coarse_hi, e.c_hi));
            chk(int'(res_fine_hi) == e.f_hi, $sformatf("fine hi %0d exp %0d", res_fine_hi, e.f_hi));
          end
        end
        res_ack = 1;
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (4) @(posedge clk); #0.3 rst_n = 1;
    repeat (4) @(posedge clk);
    for (int it = 0; it < 30; it++) begin
      // two events back to back fill both pairs; a third one is lost
      event_at(1'b1, 2, 1'b1);
      repeat (4) @(posedge clk);
      event_at(($urandom % 2) == 1, 2, 1'b1);
      repeat (4) @(posedge clk);
      event_at(1'b1, 2, 1'b0);
      repeat (60) @(posedge clk);
    end
    repeat (100) @(posedge clk);
    chk(q.size() == 0, "all results read");
    chk(n_lost == 30 && n_took == 60, $sformatf("took %0d lost %0d", n_took, n_lost));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
