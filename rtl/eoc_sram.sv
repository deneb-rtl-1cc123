// eoc_sram: end-of-column event buffer memory, DEPTH words of W bits.
//
// One synchronous write port and one synchronous read port (read data one cycle
// after the address). Reading and writing the same address in one cycle returns
// the old word. Written as an array standing in for the SRAM macro; the size,
// 2048 x 64 bit per column (or 1024 two-word events), follows the chip description.
module eoc_sram #(
  parameter int DEPTH = 2048,
  parameter int W     = 64
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [W-1:0]             wdata,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [W-1:0]             rdata
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
