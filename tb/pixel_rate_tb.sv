// pixel_rate_tb: one pixel at the event rates the chip is specified for.
//
// Phase 1 drives a steady 3.8 MHz event rate (one event every 84 cycles of the
// 320 MHz clock) for 300 events. Phase 2 drives 100 bursts of two events 100 ns
// (32 cycles) apart, the closest separation that must still be time-stamped
// event by event. Each event has a random sub-clock arrival time, a high-threshold
// crossing and a current pulse for the charge branch. The word sink is always
// ready, like a column with free buffer space.
// Checks: no event lost or merged, every event gives a timing and a charge word
// with the right address, coarse time and fine code (computed from the edge time
// as the TDC model defines it), and each timing word leaves the pixel within
// 32 cycles of the discriminator edge, so the pixel is free again before the next
// event of a 100 ns burst. Phase 3 repeats phase 2 with a 62.5 ns (20-cycle) gap,
// where the second event must be measured by the other TDC pair while the first
// pair still converts; the cycles with both pairs in use are counted. The fine
// code is compared within one bin, as the expected value is rounded from a real
// time; its exact value is checked in the TDC model's own testbench.
module pixel_rate_tb;
  timeunit 1ns; timeprecision 100fs;
  import deneb_pkg::*;
  localparam real TCLK = 3.125;
  localparam real LSB  = TCLK / 128.0;
  localparam int  RATE_PERIOD = 84;      // 320 MHz / 3.8 MHz
  localparam int  BURST_GAP   = 32;      // 100 ns
  localparam int  TIGHT_GAP   = 20;      // 62.5 ns
  localparam int  MAX_LAT     = 32;
  localparam logic [4:0] COLV = 5'd3, ROWV = 5'd30;

  logic clk = 0, rst_n = 0, sync_rst = 0, acq_en = 1, test_strobe = 0, timing_only = 0;
  logic sclk = 0, cs_n = 1, sdi = 0, sdo, disc_lo = 0, disc_hi = 0;
  logic [7:0] sipm_i = 0;
  logic [10:0] analog_trim;
  logic pgate, cryo, up_ready, dn_valid, ev_took, ev_lost, ev_merged;
  logic [4:0] row_out;
  word_t dn_data;

  pixel dut (.clk, .rst_n, .sync_rst, .acq_en, .test_strobe, .timing_only, .sclk, .cs_n, .sdi, .sdo,
    .disc_lo, .disc_hi, .sipm_i, .analog_trim, .pgate, .cryo, .col(COLV), .row_in(ROWV), .row_out,
    .up_valid(1'b0), .up_data('0), .up_ready, .dn_valid, .dn_data, .dn_ready(1'b1),
    .ev_took, .ev_lost, .ev_merged);

  typedef struct { int c_lo, f_lo, cyc; } rexp_t;
  rexp_t q[$];
  int checks = 0, failures = 0, n_took = 0, n_lost = 0, n_merged = 0, n_words = 0;
  int n_both_busy = 0, max_lat = 0;
  int unsigned tbq = 0, cyc = 0;
  bit want_charge = 0;
  rexp_t cur;

  always #(TCLK/2) clk = ~clk;
  always @(posedge clk) begin
    tbq <= sync_rst ? 0 : tbq + 1;
    cyc <= cyc + 1;
  end

  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    n_took += int'(ev_took); n_lost += int'(ev_lost); n_merged += int'(ev_merged);
    if ((dut.u_dig.u_tac.tdc_busy[0] || dut.u_dig.u_tac.pend[0] || dut.u_dig.u_tac.open_q[0]) &&
        (dut.u_dig.u_tac.tdc_busy[2] || dut.u_dig.u_tac.pend[1] || dut.u_dig.u_tac.open_q[1])) n_both_busy++;
  end

  // word sink
  always @(posedge clk) if (rst_n && dn_valid) begin
    n_words++;
    if (!want_charge) begin
      if (q.size() == 0) chk(0, "unexpected word");
      else begin
        cur = q.pop_front();
        chk(dn_data[63] == 0 && dn_data[62:53] == {COLV, ROWV}, "timing word and address");
        chk(int'(dn_data[52:37]) == cur.c_lo, $sformatf("coarse %0d exp %0d", dn_data[52:37], cur.c_lo));
        chk(int'(dn_data[36:29]) - cur.f_lo <= 1 && cur.f_lo - int'(dn_data[36:29]) <= 1, $sformatf("fine %0d exp %0d", dn_data[36:29], cur.f_lo));
        if (int'(cyc) - cur.cyc > max_lat) max_lat = int'(cyc) - cur.cyc;
        chk(int'(cyc) - cur.cyc <= MAX_LAT, $sformatf("latency %0d cycles", int'(cyc) - cur.cyc));
        want_charge = 1;
      end
    end else begin
      want_charge = 0;
      chk(dn_data[63] == 1 && int'(dn_data[52:37]) == cur.c_lo, "charge word follows");
    end
  end

  task automatic spi_load(logic [31:0] w);
    @(negedge clk); cs_n = 0;
    for (int i = 31; i >= 0; i--) begin
      sdi = w[i]; repeat (2) @(negedge clk); sclk = 1; repeat (2) @(negedge clk); sclk = 0;
    end
    cs_n = 1; repeat (3) @(negedge clk);
  endtask

  // One event: low threshold rises at a random offset within a clock period,
  // the high threshold 0.5 ns later; 6 cycles above threshold; a current pulse.
  // Returns after the falling edge, about 7 cycles after the call.
  task automatic fire();
    rexp_t e; realtime te, t; int qe; real s;
    @(posedge clk); te = $realtime;
    #0.01; qe = int'(tbq); e.cyc = int'(cyc);
    #(real'($urandom % 3000) / 1000.0);
    t = $realtime; disc_lo = 1;
    // stop edge: first clock edge at least half a period after the start
    s = $ceil((t + TCLK/2 - te) / TCLK - 0.0001);
    e.c_lo = qe + int'(s); e.f_lo = int'($floor((te + s * TCLK - t) / LSB + 0.0005));
    q.push_back(e);
    #0.5 disc_hi = 1;
    @(negedge clk); sipm_i = 8'd40;
    repeat (3) @(negedge clk); sipm_i = 0;
    repeat (2) @(posedge clk);
    #1 disc_hi = 0; #0.2 disc_lo = 0;
  endtask

  initial begin
    repeat (150000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int t0, n1, cycles1;
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk); sync_rst = 1; @(negedge clk); sync_rst = 0;
    // enabled, charge on, extension 4 cycles, no hold-off
    spi_load({11'h0, 8'd0, 8'd4, 1'b0, 1'b0, 1'b1, 1'b0, 1'b1});
    repeat (20) @(posedge clk);
    // phase 1: 3.8 MHz
    t0 = int'(cyc);
    for (int i = 0; i < 300; i++) begin
      int st;
      st = int'(cyc);
      fire();
      while (int'(cyc) - st < RATE_PERIOD - 1) @(posedge clk);
    end
    cycles1 = int'(cyc) - t0;
    repeat (60) @(posedge clk);
    n1 = n_took;
    chk(n1 == 300, $sformatf("3.8 MHz: %0d of 300 events taken", n1));
    chk(cycles1 <= 300 * RATE_PERIOD + 10, $sformatf("3.8 MHz: 300 events in %0d cycles", cycles1));
    // phase 2: bursts of two events 100 ns apart
    for (int i = 0; i < 100; i++) begin
      int st;
      st = int'(cyc);
      fire();
      while (int'(cyc) - st < BURST_GAP - 1) @(posedge clk);
      fire();
      repeat (100 + $urandom % 50) @(posedge clk);
    end
    repeat (100) @(posedge clk);
    chk(n_took - n1 == 200, $sformatf("100 ns bursts: %0d of 200 events taken", n_took - n1));
    chk(n_both_busy == 0, "at 100 ns one TDC pair is free again before the next event");
    // phase 3: bursts 62.5 ns apart, the second event needs the other TDC pair
    n1 = n_took;
    for (int i = 0; i < 100; i++) begin
      int st;
      st = int'(cyc);
      fire();
      while (int'(cyc) - st < TIGHT_GAP - 1) @(posedge clk);
      fire();
      repeat (100 + $urandom % 50) @(posedge clk);
    end
    repeat (100) @(posedge clk);
    chk(n_took - n1 == 200, $sformatf("62.5 ns bursts: %0d of 200 events taken", n_took - n1));
    chk(n_lost == 0, $sformatf("%0d events lost", n_lost));
    chk(n_merged == 0, $sformatf("%0d events merged", n_merged));
    chk(q.size() == 0 && !want_charge, $sformatf("%0d events not read out", q.size()));
    chk(n_words == 2 * 700, $sformatf("words %0d", n_words));
    chk(n_both_busy > 0, "both TDC pairs in use at once during the 62.5 ns bursts");
    $display("rate test: max latency %0d cycles, cycles with both pairs in use %0d", max_lat, n_both_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
