// tmr_reg: register held in three copies with a majority vote.
//
// Used for configuration state in the periphery, where triple modular redundancy
// protects against single-event upsets. Each cycle the voted value is written back
// into all three copies (scrubbing), so a single upset disappears after one clock.
// `seu_inj` flips bit 0 of the chosen copy (one-hot, test only); `err` is high in
// a cycle where the copies disagree. Which blocks use TMR is this design's choice.
module tmr_reg #(
  parameter int WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [WIDTH-1:0] d,
  input  logic [2:0]       seu_inj,
  output logic [WIDTH-1:0] q,
  output logic             err
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [WIDTH-1:0] c0, c1, c2;

  assign q   = (c0 & c1) | (c1 & c2) | (c0 & c2);
  assign err = (c0 != c1) || (c1 != c2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c0 <= '0; c1 <= '0; c2 <= '0;
    end else begin
      c0 <= (we ? d : q) ^ WIDTH'(seu_inj[0]);
      c1 <= (we ? d : q) ^ WIDTH'(seu_inj[1]);
      c2 <= (we ? d : q) ^ WIDTH'(seu_inj[2]);
    end
  end
endmodule
