// mcc_ttc: trigger, timing and control block of the MCC.
//
// Triggers (LV1) decoded from the ROD's command stream are passed to all FE chips
// as one-clock pulses on the bunch-crossing clock. As in the paper, one command
// can produce a pattern of contiguous triggers (1..16, set in the register bank),
// and the pending event counter (PEND. EV. CNT.) counts triggers sent minus events
// done by the event builder; a trigger that would make more than n events pending
// (n = 1..15, the most an FE chip can hold) is suppressed and counted.
//
// SYNC re-synchronises the module. It is requested by the ROD's SYNC command or,
// when auto-SYNC is enabled, by an error seen in a receiver or the event builder.
// Triggers are then held back; once every pending event has been built (or, if
// an event can no longer complete because an end-of-event word was lost, after
// SYNC_WAIT clocks) and the event builder is idle, the TTC sends SYNC to the FE
// chips and, in the same
// clock, flushes the FIFOs, score board, pending triggers and counters of the MCC,
// and marks the next event with a warning. Waiting for the builder, the time-out,
// the auto-SYNC trigger and the warning after any SYNC are this design's reading
// of the paper.
//
// Interface: lv1_cmd and sync_cmd are one-clock pulses from the command decoder;
// run gates triggers (no data taking while configuring). lv1_out pulses once per
// trigger; the first is high in the second clock after the edge that samples
// lv1_cmd, the others follow in consecutive clocks. sync_out and flush pulse
// together for one clock.
module mcc_ttc
  import mcc_pkg::*;
#(
  parameter int unsigned SYNC_WAIT = 4096   // own choice: longest wait for pending events
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             run,
  input  logic             lv1_cmd,
  input  logic             sync_cmd,
  input  logic [3:0]       max_pending,
  input  logic [3:0]       burst_m1,
  input  logic             autosync_en,
  input  logic             error,
  input  logic             event_done,
  input  logic             eb_idle,
  input  logic             eb_event_ready,
  output logic             lv1_out,
  output logic             sync_out,
  output logic             flush,
  output logic             sync_warn,
  output logic [4:0]       pending,
  output logic [REG_W-1:0] suppressed
);

  logic [4:0] burst_left;
  logic [5:0] burst_sum;
  logic       sync_req;
  logic       fire;
  logic       issue;
  logic       do_sync;
  logic [$clog2(SYNC_WAIT+1)-1:0] wait_cnt;
  logic       drained;

  assign fire      = burst_left != '0 && !sync_req;
  assign issue     = fire && pending < 5'(max_pending);
  assign drained   = pending == '0 || wait_cnt == ($bits(wait_cnt))'(SYNC_WAIT);
  assign do_sync   = sync_req && drained && eb_idle && !eb_event_ready && burst_left == '0;
  assign burst_sum = 6'(burst_left) - 6'(fire) + 6'(burst_m1) + 6'd1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      burst_left <= '0;
      sync_req   <= 1'b0;
      wait_cnt   <= '0;
      lv1_out    <= 1'b0;
      sync_out   <= 1'b0;
      flush      <= 1'b0;
      sync_warn  <= 1'b0;
      pending    <= '0;
      suppressed <= '0;
    end else begin
      sync_out  <= 1'b0;
      flush     <= 1'b0;
      sync_warn <= 1'b0;
      lv1_out   <= issue;

      // trigger pattern
      if (sync_req)                burst_left <= '0;
      else if (lv1_cmd && run)     burst_left <= (burst_sum > 6'd31) ? 5'd31 : burst_sum[4:0];
      else if (fire)               burst_left <= burst_left - 5'd1;

      if ((lv1_cmd && (!run || sync_req)) || (fire && !issue))
        suppressed <= suppressed + 1'b1;

      // pending event counter: triggers sent minus events built
      if (do_sync) begin
        pending <= '0;
      end else begin
        case ({issue, event_done && pending != '0})
          2'b10:   pending <= pending + 5'd1;
          2'b01:   pending <= pending - 5'd1;
          default: ;
        endcase
      end

      // SYNC
      if (sync_cmd || (autosync_en && error)) sync_req <= 1'b1;
      if (!sync_req || do_sync) wait_cnt <= '0;
      else if (!drained)        wait_cnt <= wait_cnt + 1'b1;
      if (do_sync) begin
        sync_req  <= 1'b0;
        sync_out  <= 1'b1;
        flush     <= 1'b1;
        sync_warn <= 1'b1;
      end
    end
  end

endmodule
