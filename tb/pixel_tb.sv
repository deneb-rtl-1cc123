// pixel_tb: one complete pixel (digital logic with its TDC and charge-branch
// models), configured over SPI and driven with discriminator edges and current
// pulses; see pixel_checks.svh for the checks (word contents against values
// computed from the stimulus, timing-only mode, lost and merged events).
module pixel_tb;
  timeunit 1ns; timeprecision 100fs;
  import deneb_pkg::*;
  localparam logic [4:0] COLV = 5'd19, ROWV = 5'd7;
  logic clk = 0, rst_n = 0, sync_rst = 0, acq_en = 1, test_strobe = 0, timing_only = 0;
  logic sclk = 0, cs_n = 1, sdi = 0, sdo, disc_lo = 0, disc_hi = 0;
  logic [7:0] sipm_i = 0;
  logic [10:0] analog_trim;
  logic pgate, cryo, up_ready, dn_valid, dn_ready = 0, ev_took, ev_lost, ev_merged;
  logic [4:0] row_out;
  word_t dn_data;
  pixel dut (.clk, .rst_n, .sync_rst, .acq_en, .test_strobe, .timing_only, .sclk, .cs_n, .sdi, .sdo,
    .disc_lo, .disc_hi, .sipm_i, .analog_trim, .pgate, .cryo, .col(COLV), .row_in(ROWV), .row_out,
    .up_valid(1'b0), .up_data('0), .up_ready, .dn_valid, .dn_data, .dn_ready, .ev_took, .ev_lost, .ev_merged);
  `include "pixel_checks.svh"
endmodule
