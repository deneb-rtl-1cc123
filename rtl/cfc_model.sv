// cfc_model: BEHAVIOURAL MODEL of the pixel charge branch, a discrete-time
// current-to-frequency converter acting as a first-order sigma-delta modulator.
//
// Stands in for an analog circuit. Each clock the mirrored SiPM current, given
// as a sample code `i_in` (charge per clock period in arbitrary units), is added
// to an integrator. Whenever the integrator holds at least QREF, one charge
// quantum QREF is removed and `pulse` is high for that cycle; the digital counter
// counts these pulses. At most one quantum is removed per clock, so the
// integrator holds the excess of a large burst and pays it out over later cycles
// (it is clamped at 16*QREF). Charge conservation makes the pulse count over a
// window equal to the integrated input divided by QREF, within one quantum.
// The conversion principle follows the chip description; QREF and the sample
// format are this model's assumptions.
module cfc_model #(
  parameter int QREF = 64
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] i_in,
  output logic       pulse
);
  timeunit 1ns;
  timeprecision 1ps;

  int acc;
  int nxt;

  always_comb begin
    nxt = acc + int'(i_in);
    if (nxt > 16 * QREF) nxt = 16 * QREF;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc   <= 0;
      pulse <= 1'b0;
    end else if (nxt >= QREF) begin
      acc   <= nxt - QREF;
      pulse <= 1'b1;
    end else begin
      acc   <= nxt;
      pulse <= 1'b0;
    end
  end
endmodule
