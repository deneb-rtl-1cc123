// spi_rx_tb: two receivers in a chain (the first triple-redundant, as for the
// global register). Shifts 64 random bits MSB first, checks that nothing changes
// before chip-select rises, that each receiver then holds its 32 bits, and that
// the chain output reproduces the first bits shifted in.
module spi_rx_tb;
  timeunit 1ns; timeprecision 100fs;
  logic clk = 0, rst_n = 0, sclk = 0, cs_n = 1, sdi = 0, sd_mid, sdo, e0, e1;
  logic [31:0] cfg0, cfg1;
  int checks = 0, failures = 0;
  spi_rx #(.WIDTH(32), .TMR(1'b1)) u0 (.clk, .rst_n, .sclk, .cs_n, .sdi, .sdo(sd_mid),
    .seu_inj(3'b000), .cfg(cfg0), .tmr_err(e0));
  spi_rx #(.WIDTH(32), .TMR(1'b0)) u1 (.clk, .rst_n, .sclk, .cs_n, .sdi(sd_mid), .sdo,
    .seu_inj(3'b000), .cfg(cfg1), .tmr_err(e1));
  always #5 clk = ~clk;
  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic bit_out(bit b);
    sdi = b; repeat (2) @(negedge clk); sclk = 1; repeat (2) @(negedge clk); sclk = 0;
  endtask
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [63:0] w, prev;
    repeat (3) @(posedge clk); rst_n = 1;
    prev = '0;
    for (int it = 0; it < 8; it++) begin
      w = {$urandom, $urandom};
      cs_n = 0; repeat (2) @(negedge clk);
      for (int i = 63; i >= 0; i--) begin
        bit_out(w[i]);
        // after 64-i bits, sdo shows the bit shifted in 64 clocks earlier
      end
      chk(cfg0 == prev[31:0] && cfg1 == prev[63:32], "shadow unchanged before load");
      cs_n = 1; repeat (3) @(negedge clk);
      // first 32 bits shifted travel to the far receiver
      chk(cfg1 == w[63:32], "far receiver");
      chk(cfg0 == w[31:0], "near receiver");
      chk(sdo == w[63], "chain output is first bit shifted");
      chk(!e0 && !e1, "no TMR error");
      prev = w;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
