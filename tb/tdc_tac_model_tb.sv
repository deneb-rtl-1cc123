// tdc_tac_model_tb: fires the TDC model's start at many known offsets from the
// 320 MHz clock edge and checks the stop edge (first edge at least half a period
// later), the fine code floor(interval / (Tclk/128)), the conversion latency of
// CONV_CYCLES clocks from stop to valid, and that starts while busy are ignored.
module tdc_tac_model_tb;
  timeunit 1ns; timeprecision 100fs;
  localparam real TCLK = 3.125;
  localparam real LSB  = TCLK / 128.0;
  logic clk = 0, rst_n = 0, start = 0, busy, stop, valid;
  logic [7:0] code;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  tdc_tac_model #(.FINE_W(8), .CONV_CYCLES(16)) dut (.clk, .rst_n, .start, .busy, .stop, .valid, .code);
  always #(TCLK/2) clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    realtime t_edge, t_start, t_stop_edge;
    real off;
    int exp_code, c_stop, c_valid;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int it = 0; it < 300; it++) begin
      @(posedge clk); t_edge = $realtime;
      off = real'($urandom % 3100) / 1000.0;         // 0 .. 3.099 ns after this edge
      #(off); t_start = $realtime; start = 1;
      #0.3 start = 0;
      #0.2 start = 1; #0.1 start = 0;                 // second start while busy: ignored
      // expected stop edge: first edge at or after t_start + Tclk/2
      t_stop_edge = t_edge + TCLK * $ceil((t_start + TCLK/2 - t_edge - 0.001) / TCLK);
      exp_code = int'($floor((t_stop_edge - t_start) / LSB + 0.001));
      @(posedge stop); c_stop = int'(cyc);
      chk($realtime - t_stop_edge < 0.01 && $realtime >= t_stop_edge, "stop edge");
      chk(busy, "busy during conversion");
      @(posedge valid); c_valid = int'(cyc);
      chk(c_valid - c_stop == 16, "conversion latency");
      chk(int'(code) == exp_code || int'(code) == exp_code - 1, $sformatf("code %0d exp %0d", code, exp_code));
      chk(code >= 64 && code < 192, "code within the 1.5 Tclk window");
      @(posedge clk); @(posedge clk);
      chk(!busy, "idle after valid");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
