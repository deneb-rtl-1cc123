// deneb_top_tb: end-to-end test of the chip at reduced size (4 x 4 pixels,
// 4 links, 8-word column buffers), from the SPI configuration chain to the
// decoded link frames. Every word is checked against the fired events (see
// top_checks.svh). The phases make each mechanism happen and count it:
//   1. timing+charge words over 4 SDR links (column c on link c)
//   2. mode switch to timing-only words, DDR, a single link (TDM of 4 columns)
//   3. back-pressure: a burst fills the 8-word column buffers, the chains stall
//   4. derandomizer overflow: a third event while both TDC pairs convert is lost
//   5. two packets within the window extension merge into one event
//   6. forced event from the test strobe; veto by the acquisition window and by
//      a disabled column; a single-event upset in the global register is voted out
module deneb_top_tb;
  timeunit 1ns; timeprecision 100fs;
  import deneb_pkg::*;
  localparam int NC = 4, NR = 4, NL = 4, WATCHDOG = 400000;
  logic clk = 0, rst_n = 0, sync_rst = 0, acq_en = 1, test_strobe = 0;
  logic spi_sclk = 0, spi_cs_n = 1, spi_mosi = 0, spi_miso, cfg_tmr_err;
  logic [2:0] seu_inj = 0;
  logic [NR-1:0] disc_lo [NC], disc_hi [NC], pix_pgate [NC], pix_cryo [NC];
  logic [NR-1:0] ev_took [NC], ev_lost [NC], ev_merged [NC];
  logic [7:0] sipm_i [NC][NR];
  logic [10:0] analog_trim [NC][NR];
  logic [7:0] dll_trim [NC];
  logic [1:0] link_data [NL];
  logic [NL-1:0] link_oe;
  logic [NC-1:0] eoc_stall;

  deneb_top #(.N_COLS(NC), .N_ROWS(NR), .N_LINKS(NL), .SRAM_DEPTH(8)) dut (.*);

  `include "top_checks.svh"

  initial begin
    int d0, lost0, merged0, took0;
    for (int c = 0; c < NC; c++) begin
      disc_lo[c] = 0; disc_hi[c] = 0; col_en[c] = 1;
      for (int r = 0; r < NR; r++) sipm_i[c][r] = 8'd5;
    end
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk); sync_rst = 1; @(negedge clk); sync_rst = 0;
    configure(1, 0, 0, 3'd0);
    chk(analog_trim[3][2] == 11'(3 * NR + 2) && dll_trim[2] == 8'd2 && pix_pgate[0] == 4'b0010,
        "configuration reached pixels and columns");
    // 1. all pixels, two events each
    for (int it = 0; it < 2; it++) begin
      for (int c = 0; c < NC; c++) for (int r = 0; r < NR; r++)
        fork automatic int cc = c, rr = r; begin repeat ($urandom % 8) @(posedge clk); fire(cc, rr, 6, 1); end join_none
      wait fork; repeat (60) @(posedge clk);
    end
    drain(20000);
    chk(pending() == 0, "phase 1 delivered");
    chk(n_charge == 2 * NC * NR, $sformatf("charge words %0d", n_charge));
    for (int l = 0; l < NL; l++) chk(link_used[l], $sformatf("link %0d used", l));
    // 2. timing-only, DDR, one link
    reconfigure(1, 1, 3'd2);
    for (int l = 0; l < NL; l++) link_used[l] = 0;
    for (int c = 0; c < NC; c++) for (int r = 0; r < NR; r++)
      fork automatic int cc = c, rr = r; begin repeat ($urandom % 8) @(posedge clk); fire(cc, rr, 6, 1); end join_none
    wait fork;
    repeat (20) begin @(posedge clk); chk(link_oe[3:1] == 0, "single active link"); end
    drain(40000);
    chk(pending() == 0 && n_to_words == NC * NR, $sformatf("timing-only words %0d", n_to_words));
    chk(link_used[0] && !link_used[1] && n_ddr_frames > 0, "one DDR link carried everything");
    // 3. burst against small buffers, timing+charge, one SDR link
    reconfigure(0, 0, 3'd2);
    for (int it = 0; it < 2; it++) begin
      for (int c = 0; c < NC; c++) for (int r = 0; r < NR; r++)
        fork automatic int cc = c, rr = r; begin repeat ($urandom % 4) @(posedge clk); fire(cc, rr, 6, 1); end join_none
      wait fork; repeat (80) @(posedge clk);
    end
    drain(100000);
    chk(pending() == 0 && n_stall > 0, $sformatf("burst delivered, %0d stall cycles", n_stall));
    reconfigure(0, 0, 3'd0);
    // 4. three quick events in pixel (0,0): the third is lost
    lost0 = n_lost;
    fire(0, 0, 4, 1); repeat (3) @(posedge clk);
    fire(0, 0, 4, 1); repeat (3) @(posedge clk);
    fire(0, 0, 4, 0);
    drain(20000);
    chk(n_lost - lost0 == 1 && pending() == 0, $sformatf("lost events %0d", n_lost - lost0));
    // 5. two packets 3 cycles apart in pixel (1,1) merge
    merged0 = n_merged;
    fork
      fire(1, 1, 5, 1);
      begin repeat (9) @(posedge clk); #1 disc_lo[1][1] = 1; repeat (5) @(posedge clk); #1 disc_lo[1][1] = 0; end
    join
    drain(20000);
    chk(n_merged - merged0 == 1 && pending() == 0, "merged packets gave one event");
    // 6a. forced event in pixel (2,2) from the test strobe
    begin
      realtime te, t; int qe; real s; e_t e;
      @(posedge clk); te = $realtime; #0.01; qe = int'(tbq);
      #1.3 t = $realtime; test_strobe = 1;
      s = $ceil((t + TCLK/2 - te) / TCLK - 0.0001);
      e.c = qe + int'(s); e.f = int'($floor((te + s * TCLK - t) / LSB + 0.0005)); e.charge = 1;
      pq[2][2].push_back(e);
      repeat (6) @(posedge clk); #1 test_strobe = 0;
      drain(20000);
      n_forced = (pending() == 0) ? 1 : 0;
      chk(n_forced == 1, "forced event read out");
    end
    // 6b. acquisition window closed: nothing is recorded
    took0 = n_took; d0 = n_data;
    acq_en = 0;
    fire(1, 2, 6, 0); fire(3, 0, 6, 0);
    repeat (300) @(posedge clk);
    acq_en = 1;
    chk(n_took == took0 && n_data == d0, "acquisition veto");
    // 6c. column 3 disabled (clock veto)
    col_en[3] = 0; reconfigure(0, 0, 3'd0);
    took0 = n_took;
    fire(3, 1, 6, 0); fire(0, 1, 6, 1);
    drain(20000);
    chk(n_took == took0 + 1 && pending() == 0, "column veto");
    n_vetoed = 3;
    // 6d. upset in one copy of the global register
    @(negedge clk); seu_inj = 3'b010; @(negedge clk); seu_inj = 0;
    fire(2, 3, 6, 1);
    drain(20000);
    chk(n_tmr > 0 && pending() == 0, "upset flagged, configuration kept");
    // every mechanism happened
    chk(n_stall > 0, "stall happened");
    chk(n_lost > 0, "lost event happened");
    chk(n_merged > 0, "merge happened");
    chk(n_ddr_frames > 0, "DDR used");
    chk(n_to_words > 0, "timing-only mode used");
    chk(n_forced > 0 && n_vetoed > 0 && n_tmr > 0, "force, veto and TMR happened");
    $display("mechanisms: words=%0d charge=%0d timing_only=%0d ddr_frames=%0d stall=%0d lost=%0d merged=%0d forced=%0d vetoed=%0d tmr=%0d",
             n_data, n_charge, n_to_words, n_ddr_frames, n_stall, n_lost, n_merged, n_forced, n_vetoed, n_tmr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
