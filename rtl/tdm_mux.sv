// tdm_mux: time-division multiplexing of column buffers onto the output links.
//
// With `link_sel` = s, n = N_LINKS >> s links are active (s = 0..log2(N_LINKS)).
// Active link l serves the columns c with c mod n = l, taking one word at a time
// from them in round-robin order, so fewer links can carry the whole chip at a
// lower aggregate rate. Inactive links are disabled (`link_active` low).
// Per link: `link_valid`/`link_data` show the word of the next column in turn that
// has one; `link_take` (from the serializer) removes it (`col_pop` to that column)
// and moves the round-robin pointer past that column. Purely combinational apart
// from the pointers. That the 32 links share the data by time-division
// multiplexing follows the chip description; this mapping is this design's.
module tdm_mux
  import deneb_pkg::*;
#(
  parameter int N_COLS  = 32,
  parameter int N_LINKS = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [2:0]         link_sel,
  input  logic [N_COLS-1:0]  col_valid,
  input  word_t              col_data    [N_COLS],
  output logic [N_COLS-1:0]  col_pop,
  output logic [N_LINKS-1:0] link_active,
  output logic [N_LINKS-1:0] link_valid,
  output word_t              link_data   [N_LINKS],
  input  logic [N_LINKS-1:0] link_take
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int CW = $clog2(N_COLS);

  int unsigned n_act;
  logic [CW-1:0] ptr  [N_LINKS];   // last column served by each link
  logic [CW-1:0] pick [N_LINKS];

  assign n_act = (N_LINKS >> link_sel) == 0 ? 1 : (N_LINKS >> link_sel);

  for (genvar l = 0; l < N_LINKS; l++) begin : g_act
    assign link_active[l] = (l < n_act);
  end

  // Selection and pop are separate processes: link_take depends on link_valid
  // through the serializer, so the two must not share one combinational block.
  always_comb begin
    for (int l = 0; l < N_LINKS; l++) begin
      logic found;
      found   = 1'b0;
      pick[l] = '0;
      // search the link's columns starting after the last one served
      for (int k = 1; k <= N_COLS; k++) begin
        int c;
        c = (int'(ptr[l]) + k) % N_COLS;
        if (!found && link_active[l] && (c % n_act) == l && col_valid[c]) begin
          found   = 1'b1;
          pick[l] = CW'(c);
        end
      end
      link_valid[l] = found;
      link_data[l]  = col_data[pick[l]];
    end
  end

  always_comb begin
    col_pop = '0;
    for (int l = 0; l < N_LINKS; l++)
      if (link_valid[l] && link_take[l]) col_pop[pick[l]] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < N_LINKS; l++) ptr[l] <= CW'(N_COLS - 1);
    end else begin
      for (int l = 0; l < N_LINKS; l++)
        if (link_valid[l] && link_take[l]) ptr[l] <= pick[l];
    end
  end
endmodule
