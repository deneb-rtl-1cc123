// sync_fifo: small single-clock first-in first-out buffer (the in-pixel FIFO).
//
// Show-ahead: `rdata` is the oldest word whenever `empty` is low; `pop` removes it.
// A push when full and a pop when empty are ignored (the writer checks `count`).
// DEPTH must be a power of two. The chip names an in-pixel FIFO; depth is assumed.
module sync_fifo #(
  parameter int DEPTH = 4,
  parameter int W     = 64
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   push,
  input  logic [W-1:0]           wdata,
  input  logic                   pop,
  output logic [W-1:0]           rdata,
  output logic                   empty,
  output logic                   full,
  output logic [$clog2(DEPTH):0] count
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int AW = $clog2(DEPTH);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_push, do_pop;

  assign empty   = (count == 0);
  assign full    = (count == (AW+1)'(DEPTH));
  assign do_push = push & ~full;
  assign do_pop  = pop & ~empty;
  assign rdata   = mem[rp];

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_push) wp <= wp + 1'b1;
      if (do_pop)  rp <= rp + 1'b1;
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  property p_no_overflow;
    @(posedge clk) disable iff (!rst_n) push |-> !full;
  endproperty
  a_no_overflow: assert property (p_no_overflow) else $error("push into full FIFO");
endmodule
