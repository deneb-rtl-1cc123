// tdm_mux_tb: 8 columns on 8 links. For each link selection (8, 4, 2, 1 active
// links) the columns hold random numbers of words and the links take at random.
// Checks that each link only serves its own columns (column mod n = link), that
// inactive links stay idle, that every word is delivered once and in order per
// column, and that a link with all its columns busy visits them in round robin.
module tdm_mux_tb;
  timeunit 1ns; timeprecision 100fs;
  import deneb_pkg::*;
  localparam int NC = 8, NL = 8;
  logic clk = 0, rst_n = 0;
  logic [2:0] link_sel = 0;
  logic [NC-1:0] col_valid, col_pop;
  word_t col_data [NC];
  logic [NL-1:0] link_active, link_valid, link_take;
  word_t link_data [NL];
  int qn [NC], nxt [NC], last_col [NL];
  int checks = 0, failures = 0, rr_ok = 0;
  logic [NC-1:0] pm;
  tdm_mux #(.N_COLS(NC), .N_LINKS(NL)) dut (.*);
  always #5 clk = ~clk;
  for (genvar c = 0; c < NC; c++) begin : g
    assign col_valid[c] = qn[c] > 0;
    assign col_data[c]  = {32'(c), 32'(nxt[c])};
  end
  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int n, left, cyc;
    link_take = 0;
    for (int c = 0; c < NC; c++) begin qn[c] = 0; nxt[c] = 0; end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int s = 0; s < 4; s++) begin
      link_sel = 3'(s); n = NL >> s;
      for (int l = 0; l < NL; l++) last_col[l] = -1;
      for (int c = 0; c < NC; c++) qn[c] = 20 + int'($urandom % 20);
      cyc = 0;
      do begin
        for (int l = 0; l < NL; l++) link_take[l] = ($urandom % 3) != 0;
        #1; pm = col_pop;
        for (int l = 0; l < NL; l++) begin
          chk(link_active[l] == (l < n), "active links");
          if (link_valid[l] && link_take[l]) begin
            int c, k;
            c = int'(link_data[l][63:32]); k = int'(link_data[l][31:0]);
            chk(c % n == l && l < n, $sformatf("link %0d served column %0d", l, c));
            chk(k == nxt[c], "per-column order");
            chk(col_pop[c], "pop to the served column");
            // all columns of this link busy: the next one after the last served
            if (last_col[l] >= 0) begin
              int want; bit all_busy; all_busy = 1;
              for (int j = l; j < NC; j += n) if (qn[j] == 0) all_busy = 0;
              want = (last_col[l] + n) % NC;
              if (all_busy) begin chk(c == want, "round robin"); rr_ok++; end
            end
            last_col[l] = c;
          end
        end
        @(posedge clk);
        for (int c = 0; c < NC; c++) if (pm[c]) begin qn[c]--; nxt[c]++; end
        @(negedge clk);
        left = 0; for (int c = 0; c < NC; c++) left += qn[c];
        cyc++;
      end while (left > 0 && cyc < 5000);
      chk(left == 0, "all words delivered");
    end
    chk(rr_ok > 50, "round robin exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
