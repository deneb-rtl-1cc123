// eoc_ctrl: end-of-column logic of one column.
//
// Buffers the column's event words in the column SRAM (eoc_sram), used as a ring
// buffer of DEPTH words, and offers the oldest word to the link multiplexer in an
// output register (out_valid/out_data, removed by out_pop). The column chain may
// push a word whenever the buffer is not full; `col_ready` is the transmission
// token handed to the column. When the buffer is full the token is withdrawn, the
// chain stalls (`stall` pulses while a word waits) and the pixels' FIFOs fill.
//
// The column periphery also holds a 32-bit configuration receiver (spi_rx, a link
// of the configuration chain). Its column-enable bit gates the acquisition window
// sent to the column's pixels (clock veto: `col_acq_en` = acq_en & col_en); its
// DLL trim bits go to the analog skew-correction DLL, which is not built here.
// Timing: a word written to the SRAM can reach out_data three cycles later; reads
// sustain one word every two cycles. Buffer size follows the chip description;
// the stall policy and the register layout are this design's.
module eoc_ctrl
  import deneb_pkg::*;
#(
  parameter int DEPTH = 2048
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   sclk,
  input  logic                   cs_n,
  input  logic                   sdi,
  output logic                   sdo,
  input  logic                   acq_en,
  output logic                   col_acq_en,
  output logic [7:0]             dll_trim,
  input  logic                   col_valid,
  input  word_t                  col_data,
  output logic                   col_ready,
  output logic                   out_valid,
  output word_t                  out_data,
  input  logic                   out_pop,
  output logic [$clog2(DEPTH):0] level,
  output logic                   stall
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int AW = $clog2(DEPTH);

  logic [CFG_W-1:0] cfg_bits;
  col_cfg_t         cfg;
  logic [AW-1:0]    wp, rp;
  logic             wr, rd, rd_pend;
  logic [AW:0]      unread;     // words in SRAM not yet read out
  word_t            rdata;

  spi_rx #(.WIDTH(CFG_W), .TMR(1'b0)) u_cfg (
    .clk, .rst_n, .sclk, .cs_n, .sdi, .sdo, .seu_inj(3'b000), .cfg(cfg_bits), .tmr_err()
  );
  assign cfg        = col_cfg_t'(cfg_bits);
  assign col_acq_en = acq_en & cfg.col_en;
  assign dll_trim   = cfg.dll_trim;

  eoc_sram #(.DEPTH(DEPTH), .W(WORD_W)) u_sram (
    .clk, .we(wr), .waddr(wp), .wdata(col_data), .re(rd), .raddr(rp), .rdata
  );

  assign col_ready = (unread != (AW+1)'(DEPTH));
  assign wr        = col_valid & col_ready;
  assign stall     = col_valid & ~col_ready;
  assign rd        = (unread != '0) && !rd_pend && (!out_valid || out_pop);
  assign level     = unread;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp        <= '0;
      rp        <= '0;
      unread    <= '0;
      rd_pend   <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (wr) wp <= wp + 1'b1;
      if (rd) rp <= rp + 1'b1;
      unread  <= unread + (AW+1)'(wr) - (AW+1)'(rd);
      rd_pend <= rd;
      if (rd_pend) begin
        out_valid <= 1'b1;
        out_data  <= rdata;
      end else if (out_pop) begin
        out_valid <= 1'b0;
      end
    end
  end

  a_pop_valid: assert property (@(posedge clk) disable iff (!rst_n) out_pop |-> out_valid)
    else $error("pop from empty end-of-column buffer");
endmodule
