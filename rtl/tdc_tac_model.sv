// tdc_tac_model: BEHAVIOURAL MODEL (not synthesizable) of one pixel TDC channel,
// a time-to-amplitude converter (TAC) followed by an on-pixel ADC.
//
// The real channel is analog. A rising edge on `start` while idle begins a charge
// ramp; the ramp stops at the first rising clock edge that is at least half a
// clock period after the start, so the measured interval lies in [0.5, 1.5) Tclk,
// an effective interpolation window of 1.5 clock periods that keeps the stop edge
// away from the start. At that clock edge `stop` goes high for one cycle (the
// digital logic latches its coarse counter on it). After CONV_CYCLES cycles of
// conversion, `valid` pulses for one cycle with `code` = floor(interval / LSB),
// LSB = Tclk / 2**(FINE_W-1); with FINE_W = 8 and a 320 MHz clock the bin is
// 24.4 ps and codes run from 64 to 191. `busy` is high from the start edge until
// after `valid`; edges on `start` while busy are ignored.
// The 1.5 Tclk window follows the chip description; the clock period, the bin and
// the conversion time are assumptions of this model. Uses $realtime, in ns.
module tdc_tac_model #(
  parameter int  FINE_W      = 8,
  parameter int  CONV_CYCLES = 16,
  parameter real TCLK_NS     = 3.125
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              stop,
  output logic              valid,
  output logic [FINE_W-1:0] code
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam real LSB_NS = TCLK_NS / real'(2 ** (FINE_W - 1));

  realtime     t_start;
  int unsigned n_start = 0;     // starts seen (written only by the start process)
  int unsigned n_done  = 0;     // conversions finished (written only by the clock process)
  bit          ramping;
  int          conv_cnt;
  real         dt;

  assign busy = (n_start != n_done);

  always @(posedge start) begin
    if (rst_n && n_start == n_done) begin
      t_start = $realtime;
      n_start = n_start + 1;
    end
  end

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_done   <= n_start;
      ramping  <= 1'b0;
      conv_cnt <= 0;
      stop     <= 1'b0;
      valid    <= 1'b0;
      code     <= '0;
    end else begin
      stop  <= 1'b0;
      valid <= 1'b0;
      if (busy && !ramping && conv_cnt == 0 && !valid) begin
        dt = $realtime - t_start;
        if (dt >= 0.5 * TCLK_NS - 0.0005) begin
          ramping  <= 1'b1;
          stop     <= 1'b1;
          code     <= FINE_W'($rtoi(dt / LSB_NS));
          conv_cnt <= CONV_CYCLES;
        end
      end else if (ramping) begin
        if (conv_cnt == 1) begin
          valid   <= 1'b1;
          ramping <= 1'b0;
        end
        conv_cnt <= conv_cnt - 1;
      end else if (valid) begin
        n_done <= n_start;
      end
    end
  end
endmodule
