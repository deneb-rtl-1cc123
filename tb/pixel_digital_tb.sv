// pixel_digital_tb: the pixel's digital control logic connected by hand to four
// TDC models and a charge-branch model, with the checks of pixel_checks.svh
// (word contents against values computed from the stimulus, timing-only mode,
// lost and merged events, configuration outputs).
module pixel_digital_tb;
  timeunit 1ns; timeprecision 100fs;
  import deneb_pkg::*;
  localparam logic [4:0] COLV = 5'd3, ROWV = 5'd30;
  logic clk = 0, rst_n = 0, sync_rst = 0, acq_en = 1, test_strobe = 0, timing_only = 0;
  logic sclk = 0, cs_n = 1, sdi = 0, sdo, disc_lo = 0, disc_hi = 0;
  logic [7:0] sipm_i = 0;
  logic [10:0] analog_trim;
  logic pgate, cryo, up_ready, dn_valid, dn_ready = 0, ev_took, ev_lost, ev_merged;
  logic [4:0] row_out;
  word_t dn_data;
  logic [3:0] tdc_start, tdc_busy, tdc_stop, tdc_valid;
  logic [7:0] tdc_code [4];
  logic cfc_pulse;
  pixel_digital dut (.clk, .rst_n, .sync_rst, .acq_en, .test_strobe, .timing_only, .sclk, .cs_n, .sdi, .sdo,
    .disc_lo, .disc_hi, .tdc_start, .tdc_busy, .tdc_stop, .tdc_valid, .tdc_code, .cfc_pulse,
    .analog_trim, .pgate, .cryo, .col(COLV), .row_in(ROWV), .row_out,
    .up_valid(1'b0), .up_data('0), .up_ready, .dn_valid, .dn_data, .dn_ready, .ev_took, .ev_lost, .ev_merged);
  for (genvar i = 0; i < 4; i++) begin : g_tdc
    tdc_tac_model u_tdc (.clk, .rst_n, .start(tdc_start[i]), .busy(tdc_busy[i]), .stop(tdc_stop[i]),
      .valid(tdc_valid[i]), .code(tdc_code[i]));
  end
  cfc_model u_cfc (.clk, .rst_n, .i_in(sipm_i), .pulse(cfc_pulse));
  `include "pixel_checks.svh"
endmodule
