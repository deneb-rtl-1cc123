// link_serializer: frames and serialises 64-bit event words for one output link.
//
// Each word is sent as a 66-bit frame: a 2-bit header (01 = data, 10 = idle, see
// deneb_pkg) followed by the 64-bit word, most significant bit first. When no word
// is waiting at a frame boundary, an idle frame (header 10, payload zero) is sent,
// so the receiver can always find frame alignment from the headers.
// SDR: one bit per clock on sout[1] (sout[0] repeats it). DDR: two bits per clock,
// sout[1] for the rising-edge half and sout[0] for the falling-edge half, for the
// pad's double-data-rate output stage. At a 320 MHz clock this is 320 or 640 Mbps.
// A frame takes 66 clocks in SDR and 33 in DDR. `take` pulses in the cycle a new
// word is loaded. `ddr` is sampled at frame boundaries. While `active` is low the
// link sends nothing and `oe` (to the tri-state driver) is low.
// The link rates follow the chip description; the framing is this design's.
module link_serializer
  import deneb_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       active,
  input  logic       ddr,
  input  logic       valid,
  input  word_t      data,
  output logic       take,
  output logic [1:0] sout,
  output logic       oe
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int FRAME = WORD_W + 2;

  logic [FRAME-1:0] sh;
  logic [6:0]       left;      // bits of the current frame still to send
  logic             ddr_q;
  logic [6:0]       step;
  logic             boundary;

  assign step     = ddr_q ? 7'd2 : 7'd1;
  assign boundary = (left <= step);
  assign take     = active && boundary && valid;
  assign oe       = active && (left != 0);
  assign sout     = !oe ? 2'b00 : ddr_q ? sh[FRAME-1 -: 2] : {2{sh[FRAME-1]}};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh    <= '0;
      left  <= '0;
      ddr_q <= 1'b0;
    end else if (!active) begin
      left  <= '0;
      ddr_q <= ddr;
    end else if (boundary) begin
      sh    <= valid ? {HDR_DATA, data} : {HDR_IDLE, WORD_W'(0)};
      left  <= 7'(FRAME);
      ddr_q <= ddr;
    end else begin
      sh   <= sh << step;
      left <= left - step;
    end
  end
endmodule
