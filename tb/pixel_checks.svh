// Shared stimulus and checking for the pixel testbenches (included inside the
// testbench module after the DUT signals are declared).
//
// The pixel is configured over its SPI receiver; events are generated from
// asynchronous discriminator edges at random sub-clock offsets together with a
// current pulse for the charge branch. The expected words are computed from the
// edge times (coarse time, fine codes as in the TDC model), the pulse length
// (ToT, window) and the injected charge (pulse count within one quantum).
  localparam real TCLK = 3.125;
  localparam real LSB  = TCLK / 128.0;
  localparam int  QREF = 64;
  int checks = 0, failures = 0, n_took = 0, n_lost = 0, n_merged = 0;
  int unsigned tbq = 0;                 // mirror of the coarse counter
  typedef struct { int c_lo, f_lo, hi, c_hi, f_hi, tot, chg_min, win_min; bit charge; } pexp_t;
  pexp_t pq[$];

  always #(TCLK/2) clk = ~clk;
  always @(posedge clk) tbq <= sync_rst ? 0 : tbq + 1;
  always @(posedge clk) if (rst_n) begin
    n_took += int'(ev_took); n_lost += int'(ev_lost); n_merged += int'(ev_merged);
  end

  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic spi_load(logic [31:0] w);
    @(negedge clk); cs_n = 0;
    for (int i = 31; i >= 0; i--) begin
      sdi = w[i]; repeat (2) @(negedge clk); sclk = 1; repeat (2) @(negedge clk); sclk = 0;
    end
    cs_n = 1; repeat (3) @(negedge clk);
  endtask

  // event: lo rises at a random offset, hi (optional) 0.3-1.0 ns later; current
  // `cur` per clock for `nq` cycles starting 4 cycles after the rise; lo high for
  // `len` cycles.
  task automatic pix_event(bit with_hi, int len, int cur, int nq, int ext, bit timing_only, bit keep);
    pexp_t e; realtime te, t, t_rise; int qe; real s;
    @(posedge clk); te = $realtime;
    #0.01; qe = int'(tbq);
    #(real'($urandom % 3000) / 1000.0);
    t = $realtime; disc_lo = 1; t_rise = t;
    s = $ceil((t + TCLK/2 - te) / TCLK - 0.0001);
    e.c_lo = qe + int'(s); e.f_lo = int'($floor((te + s * TCLK - t) / LSB + 0.0005));
    e.hi = with_hi;
    if (with_hi) begin
      #(0.3 + real'($urandom % 700) / 1000.0);
      t = $realtime; disc_hi = 1;
      s = $ceil((t + TCLK/2 - te) / TCLK - 0.0001);
      e.c_hi = qe + int'(s); e.f_hi = int'($floor((te + s * TCLK - t) / LSB + 0.0005));
    end
    repeat (4) @(negedge clk);
    sipm_i = 8'(cur);
    repeat (nq) @(negedge clk);
    sipm_i = 0;
    repeat (len - 4 - nq) @(posedge clk);
    #1 disc_hi = 0; #0.2 disc_lo = 0;
    // clock edges that sample the discriminator high
    e.tot = int'($floor(($realtime - te) / TCLK)) - int'($floor((t_rise - te) / TCLK)); e.chg_min = cur * nq / QREF; e.win_min = e.tot + ext; e.charge = !timing_only;
    if (keep) pq.push_back(e);
  endtask

  // word sink with random back-pressure
  always @(negedge clk) dn_ready <= ($urandom % 4) != 0;
  pexp_t cur_e; bit want_charge = 0;
  int skip = 0;
  always @(posedge clk) if (rst_n && dn_valid && dn_ready) begin
    if (skip > 0) skip--;
    else if (!want_charge) begin
      if (pq.size() == 0) chk(0, "unexpected word");
      else begin
        cur_e = pq.pop_front();
        chk(dn_data[63] == 0, "timing word first");
        chk(dn_data[62:53] == {COLV, ROWV}, "address");
        chk(int'(dn_data[52:37]) == cur_e.c_lo, $sformatf("coarse %0d exp %0d", dn_data[52:37], cur_e.c_lo));
        chk(int'(dn_data[36:29]) == cur_e.f_lo, $sformatf("fine lo %0d exp %0d", dn_data[36:29], cur_e.f_lo));
        if (cur_e.hi) begin
          chk(int'(dn_data[28:21]) == cur_e.f_hi, "fine hi");
          chk(int'(dn_data[20:13]) == cur_e.c_hi - cur_e.c_lo, "slew-rate coarse");
        end else chk(dn_data[20:13] == 8'hFF, "no high crossing");
        chk(int'(dn_data[12:0]) == cur_e.tot,
            $sformatf("tot %0d exp %0d", dn_data[12:0], cur_e.tot));
        want_charge = cur_e.charge;
      end
    end else begin
      want_charge = 0;
      chk(dn_data[63] == 1 && int'(dn_data[52:37]) == cur_e.c_lo, "charge word header");
      chk(int'(dn_data[36:21]) >= cur_e.chg_min && int'(dn_data[36:21]) <= cur_e.chg_min + 1,
          $sformatf("charge %0d exp %0d", dn_data[36:21], cur_e.chg_min));
      chk(int'(dn_data[20:8]) == cur_e.win_min,
          $sformatf("window %0d exp %0d", dn_data[20:8], cur_e.win_min));
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] cfgw;
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk); sync_rst = 1; @(negedge clk); sync_rst = 0;
    // trim 0x5A5, hold-off 0, ext 6, cryo, no force, charge on, power gating, enable
    cfgw = {11'h5A5, 8'd0, 8'd6, 1'b1, 1'b0, 1'b1, 1'b1, 1'b1};
    spi_load(cfgw);
    chk(analog_trim == 11'h5A5 && pgate && cryo, "analog configuration outputs");
    chk(sdo == cfgw[31], "configuration chain output");
    // timing + charge events
    for (int it = 0; it < 20; it++) begin
      pix_event(($urandom % 3) != 0, 12 + int'($urandom % 10), 16 + int'($urandom % 48), 6, 6, 0, 1);
      repeat (40) @(posedge clk);
    end
    // timing-only mode: one word per event
    timing_only = 1;
    for (int it = 0; it < 8; it++) begin
      pix_event(1, 12, 20, 4, 6, 1, 1);
      repeat (40) @(posedge clk);
    end
    timing_only = 0;
    // three events in quick succession: the third finds both TDC pairs busy
    n_lost = 0;
    spi_load({11'h5A5, 8'd0, 8'd0, 1'b1, 1'b0, 1'b1, 1'b1, 1'b1});   // extension off
    repeat (50) @(posedge clk);
    pix_event(1, 4, 10, 0, 0, 0, 1); repeat (3) @(posedge clk);
    pix_event(1, 4, 10, 0, 0, 0, 1); repeat (3) @(posedge clk);
    pix_event(1, 4, 10, 0, 0, 0, 0);
    repeat (100) @(posedge clk);
    chk(n_lost == 1, $sformatf("lost events %0d", n_lost));
    // two packets within the extension merge into one event
    spi_load(cfgw);
    n_merged = 0; skip = 2;
    @(posedge clk); #1 disc_lo = 1; repeat (5) @(posedge clk); #1 disc_lo = 0;
    repeat (3) @(posedge clk); #1 disc_lo = 1; repeat (5) @(posedge clk); #1 disc_lo = 0;
    repeat (100) @(posedge clk);
    chk(n_merged == 1, "merged packets");
    repeat (200) @(posedge clk);
    chk(pq.size() == 0, $sformatf("%0d events not read out", pq.size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
