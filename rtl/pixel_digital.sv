// pixel_digital: the digital control logic of one DENEB pixel.
//
// Ties together, per pixel: the 32-bit configuration receiver (spi_rx, one link
// of the configuration chain), the address generator, the coarse time counter,
// the event definition (veto/force gate, synchroniser, window extension, hold-off),
// the ToT and charge counters, the TDC steering logic for the four TACs, the data
// formatter, the in-pixel FIFO and the pixel's stage of the column daisy chain.
//
// Data flow: the discriminator's first crossing starts a TAC (asynchronously) and
// opens an event; while open, ToT and charge pulses are counted; when it closes,
// the counts are stored in the record of the event's TDC pair; once the TACs have
// converted, the formatter writes one or two words into the FIFO, and the chain
// node sends them towards the end of column. If both TDC pairs are still busy
// when a new event begins, that event is counted as lost (`ev_lost`).
//
// Interfaces: analog side (disc_lo/disc_hi async, tdc_* to the TAC models,
// cfc_pulse from the charge branch, cfg outputs to DACs and bias), configuration
// chain (sclk, cs_n, sdi/sdo), address chain (row_in/row_out), data chain
// (up_*/dn_* valid/ready). The pixel organisation follows the chip's block
// diagram; the configuration layout (deneb_pkg::pix_cfg_t) is this design's.
module pixel_digital
  import deneb_pkg::*;
#(
  parameter int FIFO_DEPTH = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                sync_rst,
  input  logic                acq_en,
  input  logic                test_strobe,
  input  logic                timing_only,
  // configuration chain
  input  logic                sclk,
  input  logic                cs_n,
  input  logic                sdi,
  output logic                sdo,
  // analog-facing
  input  logic                disc_lo,
  input  logic                disc_hi,
  output logic [N_TDC-1:0]    tdc_start,
  input  logic [N_TDC-1:0]    tdc_busy,
  input  logic [N_TDC-1:0]    tdc_stop,
  input  logic [N_TDC-1:0]    tdc_valid,
  input  logic [FINE_W-1:0]   tdc_code [N_TDC],
  input  logic                cfc_pulse,
  output logic [10:0]         analog_trim,
  output logic                pgate,
  output logic                cryo,
  // address chain
  input  logic [COL_W-1:0]    col,
  input  logic [ROW_W-1:0]    row_in,
  output logic [ROW_W-1:0]    row_out,
  // data chain
  input  logic                up_valid,
  input  word_t               up_data,
  output logic                up_ready,
  output logic                dn_valid,
  output word_t               dn_data,
  input  logic                dn_ready,
  // event statistics (one-cycle pulses)
  output logic                ev_took,
  output logic                ev_lost,
  output logic                ev_merged
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int FAW = $clog2(FIFO_DEPTH);

  pix_cfg_t            cfg;
  logic [CFG_W-1:0]    cfg_bits;
  logic [ADDR_W-1:0]   addr;
  logic [COARSE_W-1:0] coarse;
  logic                disc_eff, disc_hi_eff, lo_sync, arm_ok;
  logic                ev_start, ev_end, ev_open, merged;
  logic [WIN_W-1:0]    win_len;
  logic [TOT_W-1:0]    tot;
  logic                tot_ovf;
  logic [CHG_W-1:0]    charge;
  logic                chg_ovf;
  logic                cur_pair;
  logic                res_valid, res_pair, res_hi_valid, res_ack;
  logic [COARSE_W-1:0] res_coarse_lo, res_coarse_hi;
  logic [FINE_W-1:0]   res_fine_lo, res_fine_hi;
  logic                push, f_empty, f_full, f_pop, loc_ready;
  word_t               f_wdata, f_rdata;
  logic [FAW:0]        f_count, f_free;

  typedef struct packed {
    logic [TOT_W-1:0] tot;
    logic             tot_ovf;
    logic [CHG_W-1:0] charge;
    logic             chg_ovf;
    logic [WIN_W-1:0] win_len;
    logic             merged;
  } ev_rec_t;
  ev_rec_t rec [2];

  spi_rx #(.WIDTH(CFG_W), .TMR(1'b0)) u_cfg (
    .clk, .rst_n, .sclk, .cs_n, .sdi, .sdo, .seu_inj(3'b000), .cfg(cfg_bits), .tmr_err()
  );
  assign cfg         = pix_cfg_t'(cfg_bits);
  assign analog_trim = cfg.analog_trim;
  assign pgate       = cfg.pgate;
  assign cryo        = cfg.cryo;

  pixel_addr_gen u_addr (.col, .row_in, .row_out, .addr);

  hs_counter #(.W(COARSE_W)) u_coarse (.clk, .rst_n, .sync_rst, .q(coarse));

  event_def u_ev (
    .clk, .rst_n, .disc_lo, .enable(cfg.enable), .force_en(cfg.force_en), .test_strobe,
    .acq_en, .ext(cfg.ext), .holdoff(cfg.holdoff), .disc_eff, .lo_sync, .arm_ok,
    .ev_start, .ev_end, .ev_open, .merged, .win_len
  );
  assign disc_hi_eff = disc_hi & cfg.enable;

  tot_counter #(.W(TOT_W)) u_tot (
    .clk, .rst_n, .clr(ev_start), .en(ev_open), .lo(lo_sync), .q(tot), .ovf(tot_ovf)
  );

  cfc_counter #(.W(CHG_W)) u_chg (
    .clk, .rst_n, .clr(ev_start), .en(ev_open), .pulse(cfc_pulse & cfg.charge_en),
    .q(charge), .ovf(chg_ovf)
  );

  tac_trigger u_tac (
    .clk, .rst_n, .disc_lo(disc_eff), .disc_hi(disc_hi_eff), .arm_ok, .ev_start, .ev_end,
    .coarse, .tdc_start, .tdc_busy, .tdc_stop, .tdc_valid, .tdc_code,
    .took(ev_took), .lost(ev_lost), .cur_pair, .res_valid, .res_pair,
    .res_coarse_lo, .res_fine_lo, .res_hi_valid, .res_coarse_hi, .res_fine_hi, .res_ack
  );

  // Store the event's counts in its TDC pair's record when the window closes.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rec[0] <= '0;
      rec[1] <= '0;
    end else if (ev_end) begin
      rec[cur_pair] <= '{tot: tot, tot_ovf: tot_ovf, charge: charge, chg_ovf: chg_ovf,
                         win_len: win_len, merged: merged};
    end
  end
  assign ev_merged = ev_end & merged;

  assign f_free = (FAW+1)'(FIFO_DEPTH) - f_count;

  data_formatter #(.FIFO_AW(FAW)) u_fmt (
    .clk, .rst_n, .timing_only, .addr, .res_valid,
    .coarse_lo(res_coarse_lo), .fine_lo(res_fine_lo), .hi_valid(res_hi_valid),
    .coarse_hi(res_coarse_hi), .fine_hi(res_fine_hi),
    .tot(rec[res_pair].tot), .tot_ovf(rec[res_pair].tot_ovf),
    .charge(rec[res_pair].charge), .chg_ovf(rec[res_pair].chg_ovf),
    .win_len(rec[res_pair].win_len), .merged(rec[res_pair].merged),
    .res_ack, .fifo_free(f_free), .push, .wdata(f_wdata)
  );

  sync_fifo #(.DEPTH(FIFO_DEPTH), .W(WORD_W)) u_fifo (
    .clk, .rst_n, .push, .wdata(f_wdata), .pop(f_pop), .rdata(f_rdata),
    .empty(f_empty), .full(f_full), .count(f_count)
  );
  assign f_pop = ~f_empty & loc_ready;

  chain_node #(.W(WORD_W)) u_node (
    .clk, .rst_n, .up_valid, .up_data, .up_ready, .loc_valid(~f_empty), .loc_data(f_rdata),
    .loc_ready, .dn_valid, .dn_data, .dn_ready
  );
endmodule
