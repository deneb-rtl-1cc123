// chain_node: one stage of a column's event-word daisy chain.
//
// Each pixel owns one output register. When it is empty it takes a word from
// upstream (the pixel further from the end of column) if one is offered, else a
// word from its own FIFO; upstream words have priority so the chain keeps
// draining towards the end of column. `up_ready` and `loc_ready` depend only on
// the stage's own register, so there is no combinational path along the column;
// a stage can pass one word every two cycles. Valid/ready handshake: a word moves
// in a cycle where valid and ready are both high. The daisy chain follows the
// chip description; the arbitration and handshake are this design's.
module chain_node #(
  parameter int W = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         up_valid,
  input  logic [W-1:0] up_data,
  output logic         up_ready,
  input  logic         loc_valid,
  input  logic [W-1:0] loc_data,
  output logic         loc_ready,
  output logic         dn_valid,
  output logic [W-1:0] dn_data,
  input  logic         dn_ready
);
  timeunit 1ns;
  timeprecision 1ps;

  assign up_ready  = ~dn_valid;
  assign loc_ready = ~dn_valid & ~up_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dn_valid <= 1'b0;
      dn_data  <= '0;
    end else if (dn_valid) begin
      if (dn_ready) dn_valid <= 1'b0;
    end else if (up_valid) begin
      dn_valid <= 1'b1;
      dn_data  <= up_data;
    end else if (loc_valid) begin
      dn_valid <= 1'b1;
      dn_data  <= loc_data;
    end
  end

  a_stable: assert property (@(posedge clk) disable iff (!rst_n)
    dn_valid && !dn_ready |=> dn_valid && $stable(dn_data))
    else $error("chain word changed while stalled");
endmodule
