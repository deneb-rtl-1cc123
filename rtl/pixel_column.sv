// pixel_column: one column of N_ROWS pixels.
//
// Three chains run through the column. Configuration: sdi enters pixel 0 and
// leaves the last pixel as sdo, each pixel adding 32 bits. Address: pixel 0 gets
// row 0 and each pixel hands row+1 to the next. Event data: words flow from the
// last pixel towards pixel 0 and leave on out_* (valid/ready) to the end of
// column; pixel 0 is the one nearest the end-of-column logic. Per-pixel event
// statistics are brought out as pulse vectors. The read-out of a column through
// a daisy chain follows the chip description; the chain details are this
// design's (see chain_node).
module pixel_column
  import deneb_pkg::*;
#(
  parameter int N_ROWS     = 32,
  parameter int FIFO_DEPTH = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sync_rst,
  input  logic              acq_en,
  input  logic              test_strobe,
  input  logic              timing_only,
  input  logic              sclk,
  input  logic              cs_n,
  input  logic              sdi,
  output logic              sdo,
  input  logic [COL_W-1:0]  col,
  input  logic [N_ROWS-1:0] disc_lo,
  input  logic [N_ROWS-1:0] disc_hi,
  input  logic [7:0]        sipm_i      [N_ROWS],
  output logic [10:0]       analog_trim [N_ROWS],
  output logic [N_ROWS-1:0] pgate,
  output logic [N_ROWS-1:0] cryo,
  output logic              out_valid,
  output word_t             out_data,
  input  logic              out_ready,
  output logic [N_ROWS-1:0] ev_took,
  output logic [N_ROWS-1:0] ev_lost,
  output logic [N_ROWS-1:0] ev_merged
);
  timeunit 1ns;
  timeprecision 1ps;

  logic             sd    [N_ROWS+1];
  logic [ROW_W-1:0] row   [N_ROWS+1];
  logic             v     [N_ROWS+1];
  word_t            d     [N_ROWS+1];
  logic             r     [N_ROWS+1];

  assign sd[0]     = sdi;
  assign sdo       = sd[N_ROWS];
  assign row[0]    = '0;
  assign v[N_ROWS] = 1'b0;
  assign d[N_ROWS] = '0;
  assign out_valid = v[0];
  assign out_data  = d[0];
  assign r[0]      = out_ready;

  for (genvar i = 0; i < N_ROWS; i++) begin : g_pix
    // pixel i: upstream is pixel i+1, downstream pixel i-1 (or the column output)
    pixel #(.FIFO_DEPTH(FIFO_DEPTH)) u_pix (
      .clk, .rst_n, .sync_rst, .acq_en, .test_strobe, .timing_only,
      .sclk, .cs_n, .sdi(sd[i]), .sdo(sd[i+1]),
      .disc_lo(disc_lo[i]), .disc_hi(disc_hi[i]), .sipm_i(sipm_i[i]),
      .analog_trim(analog_trim[i]), .pgate(pgate[i]), .cryo(cryo[i]),
      .col, .row_in(row[i]), .row_out(row[i+1]),
      .up_valid(v[i+1]), .up_data(d[i+1]), .up_ready(r[i+1]),
      .dn_valid(v[i]), .dn_data(d[i]), .dn_ready(r[i]),
      .ev_took(ev_took[i]), .ev_lost(ev_lost[i]), .ev_merged(ev_merged[i])
    );
  end
endmodule
