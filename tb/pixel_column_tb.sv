// pixel_column_tb: a column of four pixels. Configures all four through the
// chained SPI receivers (each gets a different trim), then fires events in all
// pixels at random, overlapping times while the end of column drains words with
// random back-pressure. Each word must carry the right row address and, per
// pixel and in order, the coarse time and fine code computed from the edge time.
module pixel_column_tb;
  timeunit 1ns; timeprecision 100fs;
  import deneb_pkg::*;
  localparam int NR = 4;
  localparam real TCLK = 3.125;
  localparam real LSB  = TCLK / 128.0;
  logic clk = 0, rst_n = 0, sync_rst = 0, acq_en = 1, test_strobe = 0, timing_only = 0;
  logic sclk = 0, cs_n = 1, sdi = 0, sdo;
  logic [NR-1:0] disc_lo = 0, disc_hi = 0, pgate, cryo, ev_took, ev_lost, ev_merged;
  logic [7:0] sipm_i [NR];
  logic [10:0] analog_trim [NR];
  logic out_valid, out_ready = 0;
  word_t out_data;
  int checks = 0, failures = 0, n_words = 0;
  int unsigned tbq = 0;
  typedef struct { int c, f; } e_t;
  e_t pq [NR][$];
  bit exp_charge [NR];

  pixel_column #(.N_ROWS(NR)) dut (.clk, .rst_n, .sync_rst, .acq_en, .test_strobe, .timing_only,
    .sclk, .cs_n, .sdi, .sdo, .col(5'd9), .disc_lo, .disc_hi, .sipm_i, .analog_trim, .pgate, .cryo,
    .out_valid, .out_data, .out_ready, .ev_took, .ev_lost, .ev_merged);

  always #(TCLK/2) clk = ~clk;
  always @(posedge clk) tbq <= sync_rst ? 0 : tbq + 1;
  always @(negedge clk) out_ready <= ($urandom % 3) != 0;
  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    int r; r = int'(out_data[57:53]);
    n_words++;
    chk(out_data[62:58] == 5'd9 && r < NR, "column and row address");
    if (r < NR) begin
      if (!exp_charge[r]) begin
        chk(out_data[63] == 0 && pq[r].size() > 0, "timing word expected");
        if (pq[r].size() > 0) begin
          e_t e; e = pq[r].pop_front();
          chk(int'(out_data[52:37]) == e.c && int'(out_data[36:29]) == e.f,
              $sformatf("row %0d coarse %0d/%0d fine %0d/%0d", r, out_data[52:37], e.c, out_data[36:29], e.f));
        end
        exp_charge[r] = 1;
      end else begin
        chk(out_data[63] == 1, "charge word follows");
        exp_charge[r] = 0;
      end
    end
  end

  task automatic fire(int r);
    realtime te, t; int qe; real s; e_t e;
    @(posedge clk); te = $realtime; #0.01; qe = int'(tbq);
    #(real'($urandom % 3000) / 1000.0);
    t = $realtime; disc_lo[r] = 1;
    s = $ceil((t + TCLK/2 - te) / TCLK - 0.0001);
    e.c = qe + int'(s); e.f = int'($floor((te + s * TCLK - t) / LSB + 0.0005));
    pq[r].push_back(e);
    repeat (5 + $urandom % 10) @(posedge clk);
    #1 disc_lo[r] = 0;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [31:0] w;
    for (int r = 0; r < NR; r++) begin sipm_i[r] = 8'd3; exp_charge[r] = 0; end
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk); sync_rst = 1; @(negedge clk); sync_rst = 0;
    // shift the last pixel's word first: it travels furthest
    cs_n = 0;
    for (int r = NR - 1; r >= 0; r--) begin
      w = {11'(100 + r), 8'd0, 8'd2, 1'b0, 1'b0, 1'b1, 1'(r % 2), 1'b1};
      for (int i = 31; i >= 0; i--) begin
        sdi = w[i]; repeat (2) @(negedge clk); sclk = 1; repeat (2) @(negedge clk); sclk = 0;
      end
    end
    cs_n = 1; repeat (3) @(negedge clk);
    for (int r = 0; r < NR; r++)
      chk(analog_trim[r] == 11'(100 + r) && pgate[r] == 1'(r % 2), $sformatf("pixel %0d configuration", r));
    for (int it = 0; it < 15; it++) begin
      fork
        begin repeat ($urandom % 5) @(posedge clk); fire(0); end
        begin repeat ($urandom % 5) @(posedge clk); fire(1); end
        begin repeat ($urandom % 5) @(posedge clk); fire(2); end
        begin repeat ($urandom % 5) @(posedge clk); fire(3); end
      join
      repeat (40) @(posedge clk);
    end
    repeat (400) @(posedge clk);
    chk(n_words == 2 * 15 * NR, $sformatf("%0d words", n_words));
    for (int r = 0; r < NR; r++) chk(pq[r].size() == 0, "all events read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
