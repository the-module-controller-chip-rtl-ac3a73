// mcc_pending_lv1: trigger counter (LV1-CNT) and pending-LV1 FIFO of the event builder.
//
// Every trigger the MCC sends to its FE chips takes the next value of an 8-bit
// trigger counter; that value waits here, in order, until the event builder has
// built the event and sends it as the event's 8-bit LV1# field. The FE chips only
// see the low 4 bits. The paper names both parts and the 8-bit field; the depth is
// this design's choice: 16, one more than the largest pending-event limit (15) the
// trigger controller can be set to.
//
// Interface: push pulses once per trigger sent. head is the oldest pending number
// and is valid while !empty; pop removes it. flush (SYNC) empties the FIFO and
// restarts the counter at 0. A push to a full FIFO is ignored and asserted against.
module mcc_pending_lv1
  import mcc_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               flush,
  input  logic               push,
  input  logic               pop,
  output logic [EVNUM_W-1:0] head,
  output logic               empty,
  output logic               full,
  output logic [EVNUM_W-1:0] lv1_count
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [EVNUM_W-1:0] mem [DEPTH];
  logic [AW:0]        wptr, rptr;

  assign empty = wptr == rptr;
  assign full  = (wptr - rptr) == (AW+1)'(DEPTH);
  assign head  = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (push && !full) mem[wptr[AW-1:0]] <= lv1_count;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr      <= '0;
      rptr      <= '0;
      lv1_count <= '0;
    end else if (flush) begin
      wptr      <= '0;
      rptr      <= '0;
      lv1_count <= '0;
    end else begin
      if (push && !full) begin
        wptr      <= wptr + 1'b1;
        lv1_count <= lv1_count + 1'b1;
      end
      if (pop && !empty) rptr <= rptr + 1'b1;
    end
  end

  a_no_overflow : assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !flush))
    else $error("mcc_pending_lv1: more pending triggers than the FIFO holds");

endmodule
