// pixel_addr_gen_tb: chains 32 address generators as in a column and checks that
// every pixel gets {column, row} with row equal to its place in the chain.
module pixel_addr_gen_tb;
  timeunit 1ns; timeprecision 100fs;
  import deneb_pkg::*;
  logic [ROW_W-1:0]  row [33];
  logic [ADDR_W-1:0] addr [32];
  logic [COL_W-1:0]  col;
  int checks = 0, failures = 0;
  assign row[0] = '0;
  for (genvar i = 0; i < 32; i++) begin : g
    pixel_addr_gen u (.col, .row_in(row[i]), .row_out(row[i+1]), .addr(addr[i]));
  end
  initial begin
    #100000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int c = 0; c < 32; c++) begin
      col = COL_W'(c); #1;
      for (int r = 0; r < 32; r++) begin
        checks++;
        if (addr[r] != ADDR_W'(c * 32 + r)) begin failures++; $display("FAIL c%0d r%0d got %h", c, r, addr[r]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
