// data_formatter: packs one finished pixel event into 64-bit event words.
//
// When the TDC logic offers a completed event (`res_valid`) and the in-pixel FIFO
// has room for all its words, the formatter pushes the timing word and, unless
// charge words are suppressed (`timing_only`), the charge word in the following
// cycle; then it acknowledges the event (`res_ack`, one cycle). Field layout: see
// deneb_pkg. The slew-rate field holds the coarse distance between the two
// thresholds' TDC stop edges, 0xFF when the high threshold was not crossed.
// Timing: two cycles per event with charge, one without. Suppressing charge to
// double the usable bandwidth follows the chip description; the layout is this
// design's.
module data_formatter
  import deneb_pkg::*;
#(
  parameter int FIFO_AW = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                timing_only,
  input  logic [ADDR_W-1:0]   addr,
  input  logic                res_valid,
  input  logic [COARSE_W-1:0] coarse_lo,
  input  logic [FINE_W-1:0]   fine_lo,
  input  logic                hi_valid,
  input  logic [COARSE_W-1:0] coarse_hi,
  input  logic [FINE_W-1:0]   fine_hi,
  input  logic [TOT_W-1:0]    tot,
  input  logic                tot_ovf,
  input  logic [CHG_W-1:0]    charge,
  input  logic                chg_ovf,
  input  logic [WIN_W-1:0]    win_len,
  input  logic                merged,
  output logic                res_ack,
  input  logic [FIFO_AW:0]    fifo_free,
  output logic                push,
  output word_t               wdata
);
  timeunit 1ns;
  timeprecision 1ps;

  timing_word_t tw;
  charge_word_t cw;
  logic         second;   // charge word pending
  logic [COARSE_W-1:0] dco;

  always_comb begin
    dco           = coarse_hi - coarse_lo;
    tw.is_charge  = 1'b0;
    tw.addr       = addr;
    tw.coarse     = coarse_lo;
    tw.fine_lo    = fine_lo;
    tw.fine_hi    = hi_valid ? fine_hi : '0;
    tw.dcoarse_hi = !hi_valid ? '1 : (dco >= COARSE_W'(255)) ? 8'hFE : dco[DCO_W-1:0];
    tw.tot        = tot;
    cw.is_charge  = 1'b1;
    cw.addr       = addr;
    cw.coarse     = coarse_lo;
    cw.charge     = charge;
    cw.win_len    = win_len;
    cw.chg_ovf    = chg_ovf;
    cw.tot_ovf    = tot_ovf;
    cw.merged     = merged;
    cw.zero       = '0;
  end

  always_comb begin
    push    = 1'b0;
    wdata   = tw;
    res_ack = 1'b0;
    if (second) begin
      push    = 1'b1;
      wdata   = cw;
      res_ack = 1'b1;
    end else if (res_valid && fifo_free >= (timing_only ? 1 : 2)) begin
      push    = 1'b1;
      res_ack = timing_only;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  second <= 1'b0;
    else         second <= !second && res_valid && !timing_only && fifo_free >= 2;
  end
endmodule
