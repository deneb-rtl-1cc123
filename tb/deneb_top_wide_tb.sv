// deneb_top_wide_tb: the chip with all 32 columns, all 32 links and full-size
// 2048-word column buffers, but only 8 pixel rows per column (256 pixels),
// taken from the configuration chain to the decoded link frames (see
// top_checks.svh).
// It checks the column-to-link mapping at its two extremes: with 32 SDR links
// each column has its own link (timing+charge words), and with a single DDR
// link (link_sel = 5) all 32 columns are time-multiplexed onto link 0
// (timing-only words). Every delivered word is compared with the fired event.
module deneb_top_wide_tb;
  timeunit 1ns; timeprecision 100fs;
  import deneb_pkg::*;
  localparam int NC = 32, NR = 8, NL = 32, WATCHDOG = 400000;
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

  deneb_top #(.N_ROWS(NR)) dut (.*);

  `include "top_checks.svh"

  initial begin
    for (int c = 0; c < NC; c++) begin
      disc_lo[c] = 0; disc_hi[c] = 0; col_en[c] = 1;
      for (int r = 0; r < NR; r++) sipm_i[c][r] = 8'd5;
    end
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk); sync_rst = 1; @(negedge clk); sync_rst = 0;
    configure(1, 0, 0, 3'd0);
    chk(analog_trim[31][7] == 11'(31 * NR + 7) && dll_trim[17] == 8'd17,
        "configuration reached the far end of the chain");
    // 32 SDR links, one per column
    for (int c = 0; c < NC; c++) for (int r = 0; r < NR; r++)
      fork automatic int cc = c, rr = r; begin repeat ($urandom % 8) @(posedge clk); fire(cc, rr, 6, 1); end join_none
    wait fork;
    drain(20000);
    chk(pending() == 0, $sformatf("%0d events not delivered on 32 links", pending()));
    chk(n_charge == NC * NR, $sformatf("charge words %0d", n_charge));
    for (int l = 0; l < NL; l++) chk(link_used[l], $sformatf("link %0d used", l));
    // one DDR link for all 32 columns, timing-only words
    reconfigure(1, 1, 3'd5);
    for (int l = 0; l < NL; l++) link_used[l] = 0;
    for (int c = 0; c < NC; c++) for (int r = 0; r < NR; r++)
      fork automatic int cc = c, rr = r; begin repeat ($urandom % 8) @(posedge clk); fire(cc, rr, 6, 1); end join_none
    wait fork;
    repeat (20) begin @(posedge clk); chk(link_oe[NL-1:1] == 0, "single active link"); end
    drain(40000);
    chk(pending() == 0 && n_to_words == NC * NR, $sformatf("timing-only words %0d", n_to_words));
    chk(link_used[0] && n_ddr_frames > 0, "one DDR link carried all columns");
    for (int l = 1; l < NL; l++) chk(!link_used[l], $sformatf("link %0d idle", l));
    $display("wide: words=%0d ddr_frames=%0d", n_data, n_ddr_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
