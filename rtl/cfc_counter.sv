// cfc_counter: real-time counter of charge-branch pulses.
//
// The charge branch is a discrete-time current-to-frequency converter: each
// `pulse` (one clock wide, synchronous) stands for a fixed quantum of integrated
// SiPM charge. The counter is cleared at event start (`clr`) and counts pulses
// while `en` (event window open), so the count is the event's charge in quanta.
// Saturates at all ones and sets `ovf`. Width is this design's choice.
module cfc_counter #(
  parameter int W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic         pulse,
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
      q   <= W'(pulse);
      ovf <= 1'b0;
    end else if (en && pulse) begin
      if (q == '1) ovf <= 1'b1;
      else         q   <= q + 1'b1;
    end
  end
endmodule
