// pixel: one DENEB pixel as seen by the digital design.
//
// The pixel's digital control logic (pixel_digital) with behavioural models of
// its four TAC-based TDC channels (tdc_tac_model) and of its current-to-frequency
// charge branch (cfc_model). The input stage, amplifier and discriminators are
// analog and are not modelled: the two discriminator outputs are inputs, as is
// the sampled mirrored current `sipm_i` for the charge-branch model. Because of
// the TDC models this module is for simulation; a synthesis flow would keep
// pixel_digital and connect the real analog channels in their place.
module pixel
  import deneb_pkg::*;
#(
  parameter int FIFO_DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sync_rst,
  input  logic             acq_en,
  input  logic             test_strobe,
  input  logic             timing_only,
  input  logic             sclk,
  input  logic             cs_n,
  input  logic             sdi,
  output logic             sdo,
  input  logic             disc_lo,
  input  logic             disc_hi,
  input  logic [7:0]       sipm_i,
  output logic [10:0]      analog_trim,
  output logic             pgate,
  output logic             cryo,
  input  logic [COL_W-1:0] col,
  input  logic [ROW_W-1:0] row_in,
  output logic [ROW_W-1:0] row_out,
  input  logic             up_valid,
  input  word_t            up_data,
  output logic             up_ready,
  output logic             dn_valid,
  output word_t            dn_data,
  input  logic             dn_ready,
  output logic             ev_took,
  output logic             ev_lost,
  output logic             ev_merged
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [N_TDC-1:0]  tdc_start, tdc_busy, tdc_stop, tdc_valid;
  logic [FINE_W-1:0] tdc_code [N_TDC];
  logic              cfc_pulse;

  pixel_digital #(.FIFO_DEPTH(FIFO_DEPTH)) u_dig (.*);

  for (genvar i = 0; i < N_TDC; i++) begin : g_tdc
    tdc_tac_model #(.FINE_W(FINE_W)) u_tdc (
      .clk, .rst_n, .start(tdc_start[i]), .busy(tdc_busy[i]), .stop(tdc_stop[i]),
      .valid(tdc_valid[i]), .code(tdc_code[i])
    );
  end

  cfc_model u_cfc (.clk, .rst_n, .i_in(sipm_i), .pulse(cfc_pulse));
endmodule
