// deneb_top: digital design of the DENEB 1024-channel SiPM readout chip.
//
// A 32 x 32 pixel matrix is read out along its 32 columns. Each pixel time-stamps
// discriminator crossings with four TAC-based TDCs and a coarse counter, counts
// charge-branch pulses over the event window, and writes one 64-bit timing word
// (plus a 64-bit charge word unless `timing_only`) into its FIFO. Words travel
// down a daisy chain to the end of column, where a 2048 x 64 SRAM ring buffer per
// column absorbs bursts. A time-division multiplexer shares the column buffers
// among 1 to 32 active serial links, each sending 66-bit frames at one (SDR) or
// two (DDR) bits per clock.
//
// Configuration is one SPI chain (MSB first, load on cs_n rising): the global
// register (32 bits, triple-redundant) first, then for each column c = 0..31 its
// periphery register (32 bits) followed by its pixels 0..31 (32 bits each):
// 32 + 32*33*32 = 33824 bits. Global fields (deneb_pkg::glob_cfg_t): run,
// timing_only, ddr, link_sel.
//
// The analog front end (current conveyor, amplifier, discriminators), the DACs,
// the skew-correction DLL and the LVDS pads are not part of this RTL: the
// discriminator outputs and sampled currents are inputs, and the analog settings
// are outputs. Each pixel contains behavioural models of its TDC channels and
// charge branch (see pixel), so this top is for simulation.
// The organisation follows the chip description; the clock (assumed 320 MHz),
// word formats, protocols and link mapping are this design's choices.
module deneb_top
  import deneb_pkg::*;
#(
  parameter int N_COLS     = 32,
  parameter int N_ROWS     = 32,
  parameter int N_LINKS    = 32,
  parameter int SRAM_DEPTH = 2048,
  parameter int FIFO_DEPTH = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               sync_rst,       // restart all coarse counters
  input  logic               acq_en,         // acquisition window (veto when low)
  input  logic               test_strobe,
  input  logic               spi_sclk,
  input  logic               spi_cs_n,
  input  logic               spi_mosi,
  output logic               spi_miso,
  input  logic [2:0]         seu_inj,        // test: upset one copy of the global register
  output logic               cfg_tmr_err,
  input  logic [N_ROWS-1:0]  disc_lo     [N_COLS],
  input  logic [N_ROWS-1:0]  disc_hi     [N_COLS],
  input  logic [7:0]         sipm_i      [N_COLS][N_ROWS],
  output logic [10:0]        analog_trim [N_COLS][N_ROWS],
  output logic [N_ROWS-1:0]  pix_pgate   [N_COLS],
  output logic [N_ROWS-1:0]  pix_cryo    [N_COLS],
  output logic [7:0]         dll_trim    [N_COLS],
  output logic [1:0]         link_data   [N_LINKS],
  output logic [N_LINKS-1:0] link_oe,
  // event statistics, one-cycle pulses per pixel and per column
  output logic [N_ROWS-1:0]  ev_took     [N_COLS],
  output logic [N_ROWS-1:0]  ev_lost     [N_COLS],
  output logic [N_ROWS-1:0]  ev_merged   [N_COLS],
  output logic [N_COLS-1:0]  eoc_stall
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [CFG_W-1:0]   gbits;
  glob_cfg_t          gcfg;
  logic               sd_glob;
  logic               sd_eoc [N_COLS];
  logic               sd_col [N_COLS+1];
  logic [N_COLS-1:0]  col_acq_en, cv, ov, opop;
  word_t              cd [N_COLS];
  logic [N_COLS-1:0]  cr;
  word_t              od [N_COLS];
  logic [N_LINKS-1:0] l_active, l_valid, l_take;
  word_t              l_data [N_LINKS];

  spi_rx #(.WIDTH(CFG_W), .TMR(1'b1)) u_glob (
    .clk, .rst_n, .sclk(spi_sclk), .cs_n(spi_cs_n), .sdi(spi_mosi), .sdo(sd_glob),
    .seu_inj, .cfg(gbits), .tmr_err(cfg_tmr_err)
  );
  assign gcfg      = glob_cfg_t'(gbits);
  assign sd_col[0] = sd_glob;
  assign spi_miso  = sd_col[N_COLS];

  for (genvar c = 0; c < N_COLS; c++) begin : g_col
    eoc_ctrl #(.DEPTH(SRAM_DEPTH)) u_eoc (
      .clk, .rst_n, .sclk(spi_sclk), .cs_n(spi_cs_n), .sdi(sd_col[c]), .sdo(sd_eoc[c]),
      .acq_en, .col_acq_en(col_acq_en[c]), .dll_trim(dll_trim[c]),
      .col_valid(cv[c]), .col_data(cd[c]), .col_ready(cr[c]),
      .out_valid(ov[c]), .out_data(od[c]), .out_pop(opop[c]),
      .level(), .stall(eoc_stall[c])
    );

    pixel_column #(.N_ROWS(N_ROWS), .FIFO_DEPTH(FIFO_DEPTH)) u_col (
      .clk, .rst_n, .sync_rst, .acq_en(col_acq_en[c]), .test_strobe,
      .timing_only(gcfg.timing_only),
      .sclk(spi_sclk), .cs_n(spi_cs_n), .sdi(sd_eoc[c]), .sdo(sd_col[c+1]),
      .col(COL_W'(c)), .disc_lo(disc_lo[c]), .disc_hi(disc_hi[c]), .sipm_i(sipm_i[c]),
      .analog_trim(analog_trim[c]), .pgate(pix_pgate[c]), .cryo(pix_cryo[c]),
      .out_valid(cv[c]), .out_data(cd[c]), .out_ready(cr[c]),
      .ev_took(ev_took[c]), .ev_lost(ev_lost[c]), .ev_merged(ev_merged[c])
    );
  end

  tdm_mux #(.N_COLS(N_COLS), .N_LINKS(N_LINKS)) u_tdm (
    .clk, .rst_n, .link_sel(gcfg.link_sel), .col_valid(ov), .col_data(od), .col_pop(opop),
    .link_active(l_active), .link_valid(l_valid), .link_data(l_data), .link_take(l_take)
  );

  for (genvar l = 0; l < N_LINKS; l++) begin : g_link
    link_serializer u_ser (
      .clk, .rst_n, .active(l_active[l] & gcfg.run), .ddr(gcfg.ddr),
      .valid(l_valid[l]), .data(l_data[l]), .take(l_take[l]),
      .sout(link_data[l]), .oe(link_oe[l])
    );
  end
endmodule
