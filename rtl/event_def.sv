// event_def: pixel event definition with veto, force and window extension.
//
// The low-threshold discriminator output is asynchronous. It is first gated:
// forced high by the test strobe when the pixel's force bit is set, and masked
// when the pixel is disabled. The gated signal `disc_eff` goes straight to the
// TDC trigger logic, and through a two-flop synchroniser to this state machine.
//
// An event opens on a synchronised rising edge, provided the pixel is not vetoed
// (global acquisition window low, or hold-off window after the previous event
// still running). It stays open while the discriminator is high and for `ext`
// further cycles after it falls; a new rising edge within that tail merges into
// the same event (`merged`). When the window ends, `ev_end` pulses with the window
// length, and a hold-off of `holdoff` cycles vetoes new events (dark-count
// suppression window). `arm_ok` tells the TDC logic it may arm for a new event.
//
// Timing: ev_start is registered, three clock edges after the discriminator rises.
// The event definition by threshold crossings and the programmable extension follow
// the chip description; the hold-off reading of its "veto window" is this design's.
module event_def
  import deneb_pkg::*;
#(
  parameter int EXT_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             disc_lo,      // async
  input  logic             enable,
  input  logic             force_en,
  input  logic             test_strobe,
  input  logic             acq_en,
  input  logic [EXT_W-1:0] ext,
  input  logic [EXT_W-1:0] holdoff,
  output logic             disc_eff,     // async, gated
  output logic             lo_sync,      // synchronised discriminator
  output logic             arm_ok,
  output logic             ev_start,
  output logic             ev_end,
  output logic             ev_open,
  output logic             merged,
  output logic [WIN_W-1:0] win_len
);
  timeunit 1ns;
  timeprecision 1ps;

  typedef enum logic [1:0] {S_IDLE, S_OPEN, S_TAIL, S_HOLD} state_t;
  state_t           state;
  logic             s1, s2, s3;
  logic [EXT_W-1:0] cnt;
  logic             rise, vetoed;

  assign disc_eff = (disc_lo | (force_en & test_strobe)) & enable;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {s1, s2, s3} <= '0;
    else        {s1, s2, s3} <= {disc_eff, s1, s2};
  end
  assign lo_sync = s2;
  assign rise    = s2 & ~s3;
  assign vetoed  = ~acq_en | (state == S_HOLD);
  assign arm_ok  = (state == S_IDLE) & acq_en & enable;
  assign ev_open = (state == S_OPEN) | (state == S_TAIL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cnt      <= '0;
      ev_start <= 1'b0;
      ev_end   <= 1'b0;
      merged   <= 1'b0;
      win_len  <= '0;
    end else begin
      ev_start <= 1'b0;
      ev_end   <= 1'b0;
      if (ev_open && win_len != '1) win_len <= win_len + 1'b1;
      unique case (state)
        S_IDLE: if (rise && !vetoed) begin
          state    <= S_OPEN;
          ev_start <= 1'b1;
          merged   <= 1'b0;
          win_len  <= '0;
        end
        S_OPEN: if (!s2) begin
          if (ext == '0) begin
            ev_end <= 1'b1;
            state  <= (holdoff == '0) ? S_IDLE : S_HOLD;
            cnt    <= holdoff - 1'b1;
          end else begin
            state <= S_TAIL;
            cnt   <= ext - 1'b1;
          end
        end
        S_TAIL: if (s2) begin
          state  <= S_OPEN;
          merged <= 1'b1;
        end else if (cnt == '0) begin
          ev_end <= 1'b1;
          state  <= (holdoff == '0) ? S_IDLE : S_HOLD;
          cnt    <= holdoff - 1'b1;
        end else begin
          cnt <= cnt - 1'b1;
        end
        S_HOLD: if (cnt == '0) state <= S_IDLE;
                else           cnt   <= cnt - 1'b1;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
