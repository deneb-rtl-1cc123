// tot_counter: coarse time-over-threshold counter.
//
// Restarted by `clr` (event start), which arrives one cycle after the first high
// sample of the synchronised discriminator and so counts that sample; afterwards,
// while `en` (event open), it counts the cycles in which the synchronised
// low-threshold discriminator `lo` is high, so merged packets add up. The result
// is the number of clock edges that saw the discriminator high. Saturates at all ones and sets `ovf`. The fine edges of the
// pulse are measured by the TDCs; this counter is the coarse part named in the
// pixel's digital logic. Width is this design's choice.
module tot_counter #(
  parameter int W = 13
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic         lo,
  output logic [W-1:0] q,
  output logic         ovf
);
  timeunit 1ns;
  timeprecision 1ps;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q   <= '0;
      ovf <= 1'b0;
    end else if (clr) begin
      q   <= W'(lo) + W'(1);
      ovf <= 1'b0;
    end else if (en && lo) begin
      if (q == '1) ovf <= 1'b1;
      else         q   <= q + 1'b1;
    end
  end
endmodule
