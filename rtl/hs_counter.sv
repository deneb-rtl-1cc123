// hs_counter: the pixel's free-running coarse time counter.
//
// Counts system-clock cycles and wraps; it is reset synchronously by `sync_rst`
// together with every other pixel, so all pixels share one time base (clock skew
// between pixels is not modelled). The TDC logic samples it at each TDC stop edge.
// The chip names "high speed counters"; width and reset scheme are this design's.
module hs_counter #(
  parameter int W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         sync_rst,
  output logic [W-1:0] q
);
  timeunit 1ns;
  timeprecision 1ps;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        q <= '0;
    else if (sync_rst) q <= '0;
    else               q <= q + 1'b1;
  end
endmodule
