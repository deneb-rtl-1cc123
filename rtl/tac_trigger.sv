// tac_trigger: steers discriminator edges to the pixel's four TDCs.
//
// The four time-to-amplitude converters (TACs) form two pairs, {0,1} and {2,3}.
// An event uses one pair: its low-threshold crossing (time of arrival) starts the
// even TDC and its high-threshold crossing (for the slew rate) the odd one. With
// two pairs, a second event can be measured while the first is still converting,
// which derandomises closely spaced events.
//
// Start gating is asynchronous: start[2k] = disc_lo & lo_arm[k], where lo_arm[k]
// is a register that is high only for the pair `ptr` that is free while the pixel
// may accept an event; start[2k+1] = disc_hi & busy[2k] & ~pend[k], i.e. the high
// threshold goes to the pair whose low-threshold TAC is running and whose event
// is not yet closed. Edges into a TAC that is already busy are ignored by the TAC.
//
// Bookkeeping is synchronous. At `ev_start` the event is assigned to `ptr` if
// that pair's even TAC was started (else it is counted as lost, `lost`), and
// `ptr` moves to the other pair. A TAC's `stop` pulse latches the coarse counter,
// its `valid` pulse the fine code. At `ev_end` the pair becomes pending; the
// oldest pending pair (`rd`) is offered on `res_*` once its conversions are done,
// and `res_ack` frees it. The pair allocation scheme is this design's own.
module tac_trigger
  import deneb_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                disc_lo,     // async, gated
  input  logic                disc_hi,     // async, gated
  input  logic                arm_ok,
  input  logic                ev_start,
  input  logic                ev_end,
  input  logic [COARSE_W-1:0] coarse,
  output logic [N_TDC-1:0]    tdc_start,
  input  logic [N_TDC-1:0]    tdc_busy,
  input  logic [N_TDC-1:0]    tdc_stop,
  input  logic [N_TDC-1:0]    tdc_valid,
  input  logic [FINE_W-1:0]   tdc_code [N_TDC],
  output logic                took,        // pulse: event got a pair
  output logic                lost,        // pulse: event found no free pair
  output logic                cur_pair,    // pair of the open event
  output logic                res_valid,
  output logic                res_pair,
  output logic [COARSE_W-1:0] res_coarse_lo,
  output logic [FINE_W-1:0]   res_fine_lo,
  output logic                res_hi_valid,
  output logic [COARSE_W-1:0] res_coarse_hi,
  output logic [FINE_W-1:0]   res_fine_hi,
  input  logic                res_ack
);
  timeunit 1ns;
  timeprecision 1ps;

  logic                ptr, rd;
  logic [1:0]          open_q, pend;
  logic [1:0]          lo_arm;
  logic [N_TDC-1:0]    done, started;
  logic [COARSE_W-1:0] cap_coarse [N_TDC];
  logic [FINE_W-1:0]   cap_fine   [N_TDC];

  for (genvar k = 0; k < 2; k++) begin : g_pair
    assign tdc_start[2*k]   = disc_lo & lo_arm[k];
    assign tdc_start[2*k+1] = disc_hi & tdc_busy[2*k] & ~pend[k];
  end

  // Register the arming so the async start gate sees glitch-free enables.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lo_arm <= '0;
    else for (int k = 0; k < 2; k++)
      lo_arm[k] <= arm_ok && !ev_start && (ptr == 1'(k)) && !open_q[k] && !pend[k]
                   && !tdc_busy[2*k] && !tdc_busy[2*k+1] && !done[2*k] && !done[2*k+1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr      <= 1'b0;
      rd       <= 1'b0;
      open_q   <= '0;
      pend     <= '0;
      done     <= '0;
      started  <= '0;
      took     <= 1'b0;
      lost     <= 1'b0;
      cur_pair <= 1'b0;
      for (int i = 0; i < N_TDC; i++) begin
        cap_coarse[i] <= '0;
        cap_fine[i]   <= '0;
      end
    end else begin
      took <= 1'b0;
      lost <= 1'b0;
      for (int i = 0; i < N_TDC; i++) begin
        if (tdc_stop[i]) begin
          cap_coarse[i] <= coarse;
          started[i]    <= 1'b1;
        end
        if (tdc_valid[i]) begin
          cap_fine[i] <= tdc_code[i];
          done[i]     <= 1'b1;
        end
      end
      if (ev_start) begin
        if (tdc_busy[2*ptr] && !open_q[ptr] && !pend[ptr]) begin
          open_q[ptr] <= 1'b1;
          cur_pair    <= ptr;
          ptr         <= ~ptr;
          took        <= 1'b1;
        end else begin
          lost        <= 1'b1;
        end
      end
      if (ev_end && open_q[cur_pair]) begin
        open_q[cur_pair] <= 1'b0;
        pend[cur_pair]   <= 1'b1;
      end
      // A TAC started by an edge that never became an event (veto raised in
      // between) is released once it has converted.
      for (int k = 0; k < 2; k++)
        if (!open_q[k] && !pend[k] && !(ev_start && ptr == 1'(k))
            && !tdc_busy[2*k] && !tdc_busy[2*k+1] && (done[2*k] || done[2*k+1])) begin
          done[2*k]      <= 1'b0;
          done[2*k+1]    <= 1'b0;
          started[2*k]   <= 1'b0;
          started[2*k+1] <= 1'b0;
        end
      if (res_valid && res_ack) begin
        pend[rd]       <= 1'b0;
        done[2*rd]     <= 1'b0;
        done[2*rd+1]   <= 1'b0;
        started[2*rd]  <= 1'b0;
        started[2*rd+1]<= 1'b0;
        rd             <= ~rd;
      end
    end
  end

  // A pair is complete when its low TAC has converted and its high TAC is idle
  // (either converted or never started).
  assign res_valid     = pend[rd] && done[2*rd] && !tdc_busy[2*rd+1]
                         && (done[2*rd+1] || !started[2*rd+1]);
  assign res_pair      = rd;
  assign res_coarse_lo = cap_coarse[2*rd];
  assign res_fine_lo   = cap_fine[2*rd];
  assign res_hi_valid  = done[2*rd+1];
  assign res_coarse_hi = cap_coarse[2*rd+1];
  assign res_fine_hi   = cap_fine[2*rd+1];
endmodule
