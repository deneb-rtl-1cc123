// pixel_addr_gen: pixel address from its place in the column.
//
// All pixels are identical; each takes the row number handed on by its neighbour
// nearer the end of column (`row_in`, 0 at the first pixel) and hands on row+1.
// The address is {column, row}; the column index comes from the column periphery.
// The chip names a pixel address generator; this chained scheme is this design's.
module pixel_addr_gen
  import deneb_pkg::*;
(
  input  logic [COL_W-1:0]  col,
  input  logic [ROW_W-1:0]  row_in,
  output logic [ROW_W-1:0]  row_out,
  output logic [ADDR_W-1:0] addr
);
  timeunit 1ns;
  timeprecision 1ps;

  assign row_out = row_in + 1'b1;
  assign addr    = {col, row_in};
endmodule
