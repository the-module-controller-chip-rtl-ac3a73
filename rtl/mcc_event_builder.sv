// mcc_event_builder: builds module events out of the 16 input FIFOs.
//
// The paper's event building runs as two concurrent processes: the receivers fill
// the FIFOs, and this block empties them. It holds the score board, the trigger
// counter with its pending-LV1 FIFO, a control FSM and the serial transmitter.
// When the oldest pending trigger is complete in every unmasked FIFO (score board
// row complete), the FSM sends the event: the 8-bit LV1# once, then, FIFO by FIFO
// from 0 to 15, the FE# followed by that FE's hits (row, column and optionally
// ToT; the trigger number is dropped from each hit), and finally the trailer. The
// score board row is then erased, the pending trigger retired and event_done
// pulsed to the trigger controller.
//
// Output format (paper: header 1, fields separated by sync bits 1, trailer 1 and
// 14 zeros; 8-bit LV1#, 8-bit FE#, 8-bit row, 5-bit column, 8-bit ToT):
//   1 LV1#[7:0] | 1 flags | {1 FE# | 1 row col [tot] ... | 1 FE-flags} ... | 1 0*14
// Own choices: an FE# field is {4'hE, fe} and a flag field {4'hF, flags}, both
// above the largest row number 159; a FE with an empty, unflagged event is left
// out; the module flag field (bit 0: re-synchronised by SYNC) appears only when
// set; with ToT the trailer has 22 zeros, one more than the longest hit field.
// Flags of a FE: WNG#0 FE warning, WNG#1 FIFO overflow, trigger number out of
// sequence (seen by the receiver or in a hit here).
//
// Empty events of all FIFOs are retired in one clock when an event starts, so
// the transmitter never runs dry inside an event. Timing: the header bit leaves
// on dout about three clocks after the event becomes complete.
module mcc_event_builder
  import mcc_pkg::*;
#(
  parameter int unsigned NFIFO = N_FE
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        flush,
  input  logic                        tot_en,
  input  logic [NFIFO-1:0]            mask,
  // receiver channels
  input  fifo_word_t                  rdata     [NFIFO],
  input  logic [NFIFO-1:0]            avail,
  output logic [NFIFO-1:0]            re,
  input  logic [NFIFO-1:0]            eoe_valid,
  input  logic [NFIFO-1:0][LV1_W-1:0] eoe_lv1,
  // trigger controller
  input  logic                        lv1_sent,
  output logic                        event_done,
  input  logic                        sync_warn,   // mark the next event: re-synchronised
  input  logic                        hold,        // do not start an event (DTO in use)
  // status
  output logic                        idle,        // nothing being built or sent
  output logic                        event_ready, // a complete event waits
  output logic [NFIFO-1:0]            hit_err,     // pulse: hit with a wrong trigger number
  output logic [EVNUM_W-1:0]          lv1_count,
  output logic                        dout
);

  localparam int unsigned LENW = $clog2(FIELD_MAX + 1);
  localparam int unsigned FW   = $clog2(NFIFO);

  typedef enum logic [2:0] {S_IDLE, S_HDR, S_MFLAG, S_SCAN, S_NEXTFE, S_DATA, S_TRAILER}
    state_e;

  state_e             state;
  logic [EVNUM_W-1:0] ev_num;
  logic               sb_ready;
  logic               sb_clear;
  logic               pend_empty, pend_full, pend_pop;
  logic [NFIFO-1:0]   fe_left;
  logic [FW-1:0]      cur;
  logic               fe_lv1_err;
  logic               mod_warn;
  logic               tx_busy;

  logic               f_valid, f_ready;
  logic [LENW-1:0]    f_len;
  logic [FIELD_MAX-1:0] f_bits;

  fifo_word_t         w;
  logic               w_eoe;
  logic [3:0]         w_flags;
  logic [NFIFO-1:0]   plain_eoe;
  logic [FW-1:0]      first_left;

  mcc_scoreboard #(.NFIFO(NFIFO), .LW(LV1_W)) u_sb (
    .clk, .rst_n, .flush,
    .set       (eoe_valid),
    .set_lv1   (eoe_lv1),
    .mask,
    .query_lv1 (ev_num[LV1_W-1:0]),
    .clear     (sb_clear),
    .ready     (sb_ready),
    .row       ()
  );

  mcc_pending_lv1 u_pend (
    .clk, .rst_n, .flush,
    .push      (lv1_sent),
    .pop       (pend_pop),
    .head      (ev_num),
    .empty     (pend_empty),
    .full      (pend_full),
    .lv1_count (lv1_count)
  );

  mcc_transmitter #(.FW(FIELD_MAX)) u_tx (
    .clk, .rst_n,
    .in_valid (f_valid),
    .in_ready (f_ready),
    .in_len   (f_len),
    .in_bits  (f_bits),
    .dout,
    .busy     (tx_busy)
  );

  assign event_ready = !pend_empty && sb_ready;
  assign idle        = state == S_IDLE && !tx_busy;

  assign w       = rdata[cur];
  assign w_eoe   = is_eoe(w);
  always_comb begin
    w_flags = w.row[3:0];
    w_flags[ERR_LV1] = w.row[ERR_LV1] | fe_lv1_err;
  end

  always_comb begin
    for (int f = 0; f < NFIFO; f++)
      plain_eoe[f] = is_eoe(rdata[f]) && rdata[f].row[3:0] == 4'h0;
    first_left = '0;
    for (int f = NFIFO - 1; f >= 0; f--)
      if (fe_left[f]) first_left = FW'(f);
  end

  // Field to send and FIFO reads, by state.
  always_comb begin
    f_valid  = 1'b0;
    f_len    = '0;
    f_bits   = '0;
    re       = '0;
    sb_clear = 1'b0;
    pend_pop = 1'b0;
    case (state)
      S_HDR: begin
        f_valid = 1'b1;
        f_len   = LENW'(1 + EVNUM_W);
        f_bits  = FIELD_MAX'({1'b1, ev_num});
      end
      S_MFLAG: begin
        f_valid = 1'b1;
        f_len   = LENW'(9);
        f_bits  = FIELD_MAX'({1'b1, FLAG_TAG, 4'b0001});
      end
      S_SCAN: begin
        for (int f = 0; f < NFIFO; f++)
          re[f] = !mask[f] && plain_eoe[f] && avail[f];
      end
      S_NEXTFE: begin
        if (fe_left != '0) begin
          f_valid = 1'b1;
          f_len   = LENW'(9);
          f_bits  = FIELD_MAX'({1'b1, FE_TAG, 4'(first_left)});
        end
      end
      S_DATA: begin
        if (!w_eoe) begin
          f_valid = 1'b1;
          if (tot_en) begin
            f_len  = LENW'(1 + ROW_W + COL_W + TOT_W);
            f_bits = FIELD_MAX'({1'b1, w.row, w.col, w.tot});
          end else begin
            f_len  = LENW'(1 + ROW_W + COL_W);
            f_bits = FIELD_MAX'({1'b1, w.row, w.col});
          end
          re[cur] = f_ready && avail[cur];
        end else if (w_flags != 4'h0) begin
          f_valid = 1'b1;
          f_len   = LENW'(9);
          f_bits  = FIELD_MAX'({1'b1, FLAG_TAG, w_flags});
          re[cur] = f_ready && avail[cur];
        end else begin
          re[cur] = avail[cur];
        end
      end
      S_TRAILER: begin
        f_valid = 1'b1;
        f_len   = tot_en ? LENW'(1 + TRAILER_ZEROS_T) : LENW'(1 + TRAILER_ZEROS);
        f_bits  = tot_en ? FIELD_MAX'(1) << TRAILER_ZEROS_T : FIELD_MAX'(1) << TRAILER_ZEROS;
        sb_clear = f_ready;
        pend_pop = f_ready;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      fe_left       <= '0;
      cur        <= '0;
      fe_lv1_err <= 1'b0;
      mod_warn   <= 1'b0;
      event_done <= 1'b0;
      hit_err    <= '0;
    end else if (flush) begin
      state      <= S_IDLE;
      fe_left       <= '0;
      fe_lv1_err <= 1'b0;
      event_done <= 1'b0;
      hit_err    <= '0;
      mod_warn   <= mod_warn | sync_warn;
    end else begin
      event_done <= 1'b0;
      hit_err    <= '0;
      if (sync_warn) mod_warn <= 1'b1;
      case (state)
        S_IDLE:
          if (event_ready && !hold) state <= S_HDR;
        S_HDR:
          if (f_ready) state <= mod_warn ? S_MFLAG : S_SCAN;
        S_MFLAG:
          if (f_ready) begin
            mod_warn <= sync_warn;
            state    <= S_SCAN;
          end
        S_SCAN: begin
          fe_left  <= ~mask & ~plain_eoe;
          state <= S_NEXTFE;
        end
        S_NEXTFE:
          if (fe_left == '0) begin
            state <= S_TRAILER;
          end else if (f_ready) begin
            cur              <= first_left;
            fe_left[first_left] <= 1'b0;
            fe_lv1_err       <= 1'b0;
            state            <= S_DATA;
          end
        S_DATA:
          if (!w_eoe) begin
            if (f_ready && avail[cur] && w.lv1 != ev_num[LV1_W-1:0]) begin
              fe_lv1_err   <= 1'b1;
              hit_err[cur] <= 1'b1;
            end
          end else if (w_flags == 4'h0 || f_ready) begin
            state <= S_NEXTFE;
          end
        S_TRAILER:
          if (f_ready) begin
            event_done <= 1'b1;
            state      <= S_IDLE;
          end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_no_dry_read : assert property (@(posedge clk) disable iff (!rst_n)
                                   (state == S_DATA) |-> avail[cur])
    else $error("mcc_event_builder: event incomplete in FIFO %0d", cur);
  a_pending : assert property (@(posedge clk) disable iff (!rst_n) !(lv1_sent && pend_full))
    else $error("mcc_event_builder: pending-LV1 FIFO overflow");

endmodule
