// spi_rx: configuration SPI receiver, one link of the chip's configuration chain.
//
// A WIDTH-bit shift register clocked by rising edges of `sclk` while `cs_n` is low
// (mode 0, MSB first). `sdo` is the register's last bit, feeding the next receiver,
// so all receivers form one long chain. On the rising edge of `cs_n` the shifted
// value is copied into the shadow register `cfg`, which the logic uses. `sclk` and
// `cs_n` are sampled by the system clock, so they must be at most clk/4.
// With TMR=1 the shadow register is triple-redundant (tmr_reg); otherwise plain.
// The chip describes 32-bit SPI receivers in the pixels and in the periphery; the
// protocol details are this design's own.
module spi_rx #(
  parameter int WIDTH = 32,
  parameter bit TMR   = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sclk,
  input  logic             cs_n,
  input  logic             sdi,
  output logic             sdo,
  input  logic [2:0]       seu_inj,   // TMR test only
  output logic [WIDTH-1:0] cfg,
  output logic             tmr_err
);
  timeunit 1ns;
  timeprecision 1ps;

  logic             sclk_q, cs_q;
  logic [WIDTH-1:0] shreg;
  logic             shift, load;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_q <= 1'b0;
      cs_q   <= 1'b1;
    end else begin
      sclk_q <= sclk;
      cs_q   <= cs_n;
    end
  end

  assign shift = sclk & ~sclk_q & ~cs_n;
  assign load  = cs_n & ~cs_q;
  assign sdo   = shreg[WIDTH-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     shreg <= '0;
    else if (shift) shreg <= {shreg[WIDTH-2:0], sdi};
  end

  if (TMR) begin : g_tmr
    tmr_reg #(.WIDTH(WIDTH)) u_tmr (
      .clk, .rst_n, .we(load), .d(shreg), .seu_inj, .q(cfg), .err(tmr_err)
    );
  end else begin : g_plain
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)    cfg <= '0;
      else if (load) cfg <= shreg;
    end
    assign tmr_err = 1'b0;
  end
endmodule
