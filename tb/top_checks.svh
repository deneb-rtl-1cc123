// Shared body of the whole-chip testbenches (included inside the testbench module
// after NC, NR, NL and SMALL are defined and the top is instantiated).
//
// A receiver per link rebuilds 66-bit frames from the serial outputs and hands
// data words to a checker, which matches each word by its pixel address against
// the events fired in that pixel: coarse time (modulo 2^16, as the counter
// wraps) and fine code computed from the edge time, a charge word after each
// timing word unless charge is suppressed, and the column-to-link mapping of
// the time-division multiplexer.
  localparam real TCLK = 3.125;
  localparam real LSB  = TCLK / 128.0;
  int checks = 0, failures = 0;
  int unsigned tbq = 0;
  typedef struct { int c, f; bit charge; } e_t;
  e_t pq [NC][NR][$];
  bit want_charge [NC][NR];
  bit g_run = 0, g_to = 0, g_ddr = 0;
  logic [2:0] g_sel = 0;
  bit col_en [NC];
  int n_data = 0, n_charge = 0, n_to_words = 0, n_ddr_frames = 0, n_lost = 0, n_merged = 0;
  int n_stall = 0, n_tmr = 0, n_forced = 0, n_vetoed = 0, n_took = 0;
  bit link_used [NL];

  always #(TCLK/2) clk = ~clk;
  always @(posedge clk) tbq <= sync_rst ? 0 : tbq + 1;
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < NC; c++) begin
      n_lost += $countones(ev_lost[c]); n_merged += $countones(ev_merged[c]);
      n_took += $countones(ev_took[c]);
    end
    n_stall += $countones(eoc_stall);
    n_tmr += int'(cfg_tmr_err);
  end

  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic got_word(int l, word_t w);
    int c, r;
    c = int'(w[62:58]); r = int'(w[57:53]);
    n_data++;
    link_used[l] = 1;
    if (c >= NC || r >= NR) begin chk(0, "address out of range"); return; end
    chk(c % (NL >> g_sel) == l, $sformatf("column %0d on link %0d", c, l));
    if (!want_charge[c][r]) begin
      e_t e;
      chk(w[63] == 0 && pq[c][r].size() > 0, $sformatf("timing word from pixel %0d,%0d expected", c, r));
      if (pq[c][r].size() > 0) begin
        e = pq[c][r].pop_front();
        chk(w[52:37] == 16'(e.c) && int'(w[36:29]) == e.f,
            $sformatf("pixel %0d,%0d coarse %0d/%0d fine %0d/%0d", c, r, w[52:37], e.c, w[36:29], e.f));
        want_charge[c][r] = e.charge;
        if (!e.charge) n_to_words++;
      end
    end else begin
      chk(w[63] == 1 && w[62:53] == {5'(c), 5'(r)}, "charge word follows");
      want_charge[c][r] = 0;
      n_charge++;
    end
  endtask

  for (genvar l = 0; l < NL; l++) begin : g_rx
    logic [65:0] fr; int nb = 0;
    always @(posedge clk) begin
      if (rst_n && link_oe[l]) begin
        if (g_ddr) begin fr = {fr[63:0], link_data[l]}; nb += 2; end
        else       begin fr = {fr[64:0], link_data[l][1]}; nb += 1; end
        if (nb == 66) begin
          nb = 0;
          if (g_ddr) n_ddr_frames++;
          if (fr[65:64] == HDR_DATA) got_word(l, fr[63:0]);
          else chk(fr[65:64] == HDR_IDLE, "frame header");
        end
      end else nb = 0;
    end
  end

  // configuration: pixel (0,0) without window extension, pixel (2,2) forced by the strobe
  function automatic logic [31:0] pix_word(int c, int r);
    pix_cfg_t p;
    p = '0;
    p.enable = 1; p.charge_en = 1; p.pgate = (r == 1);
    p.force_en = (c == 2 % NC && r == 2 % NR);
    p.ext = (c == 0 && r == 0) ? 8'd0 : 8'd6;
    p.analog_trim = 11'(c * NR + r);
    return p;
  endfunction

  task automatic shift_word(logic [31:0] w);
    for (int i = 31; i >= 0; i--) begin
      spi_mosi = w[i]; repeat (2) @(negedge clk); spi_sclk = 1; repeat (2) @(negedge clk); spi_sclk = 0;
    end
  endtask

  task automatic configure(bit run, bit to, bit ddr, logic [2:0] sel);
    glob_cfg_t g; col_cfg_t cc;
    @(negedge clk); spi_cs_n = 0;
    for (int c = NC - 1; c >= 0; c--) begin
      for (int r = NR - 1; r >= 0; r--) shift_word(pix_word(c, r));
      cc = '0; cc.col_en = col_en[c]; cc.dll_trim = 8'(c);
      shift_word(cc);
    end
    g = '0; g.run = run; g.timing_only = to; g.ddr = ddr; g.link_sel = sel;
    shift_word(g);
    spi_cs_n = 1; repeat (3) @(negedge clk);
    g_run = run; g_to = to; g_ddr = ddr; g_sel = sel;
  endtask

  task automatic reconfigure(bit to, bit ddr, logic [2:0] sel);
    configure(0, to, ddr, sel);
    repeat (5) @(negedge clk);
    configure(1, to, ddr, sel);
  endtask

  // low-threshold crossing at a random offset, held `len` cycles; `keep` = expect words
  task automatic fire(int c, int r, int len, bit keep);
    realtime te, t; int qe; real s; e_t e;
    @(posedge clk); te = $realtime; #0.01; qe = int'(tbq);
    #(real'($urandom % 3000) / 1000.0);
    t = $realtime; disc_lo[c][r] = 1;
    if ($urandom % 2) begin #0.5 disc_hi[c][r] = 1; end
    s = $ceil((t + TCLK/2 - te) / TCLK - 0.0001);
    e.c = qe + int'(s); e.f = int'($floor((te + s * TCLK - t) / LSB + 0.0005)); e.charge = !g_to;
    if (keep) pq[c][r].push_back(e);
    repeat (len) @(posedge clk);
    #1 disc_hi[c][r] = 0; disc_lo[c][r] = 0;
  endtask

  function automatic int pending();
    int n; n = 0;
    for (int c = 0; c < NC; c++) for (int r = 0; r < NR; r++) n += pq[c][r].size();
    return n;
  endfunction

  task automatic drain(int max_cycles);
    int k; k = 0;
    while ((pending() > 0 || n_inflight() > 0) && k < max_cycles) begin @(posedge clk); k++; end
    repeat (300) @(posedge clk);
  endtask

  function automatic int n_inflight();
    int n; n = 0;
    for (int c = 0; c < NC; c++) for (int r = 0; r < NR; r++) n += int'(want_charge[c][r]);
    return n;
  endfunction

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
