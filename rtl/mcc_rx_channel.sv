// mcc_rx_channel: one receiver channel of the MCC (there are 16, one per FE chip).
//
// It joins the serial receiver, the 32 x 25-bit derandomizing FIFO and the CTRL
// logic of the paper's receiver figure. Hits are written into the FIFO as they
// arrive. When an end-of-event (EoE) word arrives, CTRL writes it, copies W.PTR into
// L.PTR so the event becomes readable, and reports the event's trigger number to
// the event builder's score board.
//
// CTRL keeps the FE trigger number it expects next (the LV1# register of the
// figure) and the number of EoE words still owed by the FE, one per trigger sent
// and still open. A hit is only stored if the FIFO keeps one free word for each
// of those EoE words; otherwise it is dropped and the EoE that closes its event
// carries warning WNG#1 (partial event loss). The EoE word also carries WNG#0 when
// the FE flagged a warning, and an error bit when its trigger number is not the one
// expected. An EoE that cannot be stored at all is an error: the event is lost, the
// score board is not told, and the module must be re-synchronised (SYNC).
// The reservation rule and the flag layout are this design's own choices.
//
// Interface: din is the FE link, one bit per clock. lv1_sent pulses for each
// trigger sent to the FEs. The FIFO read side (re, rdata, avail) goes to the event
// builder; eoe_valid/eoe_lv1 go to the score board. warn/err pulse once per event
// with a warning or an error. flush (from SYNC) empties everything.
module mcc_rx_channel
  import mcc_pkg::*;
#(
  parameter int unsigned DEPTH = FIFO_DEPTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             flush,
  input  logic             tot_en,
  input  logic             masked,
  input  logic             din,
  input  logic             lv1_sent,
  input  logic             re,
  output fifo_word_t       rdata,
  output logic             avail,
  output logic             eoe_valid,
  output logic [LV1_W-1:0] eoe_lv1,
  output logic             warn,
  output logic             err
);

  localparam int unsigned CW = $clog2(DEPTH) + 1;

  fifo_word_t       rx_word;
  logic             rx_valid;
  logic [CW-1:0]    used;
  logic             full;
  logic [CW-1:0]    free_words;
  logic [CW-1:0]    owed;        // EoE words still owed by the FE
  logic [LV1_W-1:0] exp_lv1;     // LV1# register
  logic             dropped;     // a hit of the current event was dropped

  logic             we, commit;
  fifo_word_t       wdata;
  logic             got_eoe;
  logic [3:0]       flags;

  mcc_fe_rx u_rx (
    .clk, .rst_n, .flush, .tot_en,
    .din        (din & ~masked),
    .word_valid (rx_valid),
    .word       (rx_word)
  );

  assign free_words = CW'(DEPTH) - used;
  assign got_eoe    = rx_valid && is_eoe(rx_word);

  always_comb begin
    flags          = '0;
    flags[WNG_FE]  = rx_word.row[WNG_FE];
    flags[WNG_OVF] = dropped;
    flags[ERR_LV1] = rx_word.lv1 != exp_lv1;
    wdata          = rx_word;
    we             = 1'b0;
    commit         = 1'b0;
    if (got_eoe) begin
      wdata.lv1 = exp_lv1;
      wdata.row = {EOE_TAG, flags};
      wdata.col = '0;
      wdata.tot = '0;
      we        = !full;
      commit    = !full;
    end else if (rx_valid) begin
      // keep one free word for every EoE still owed (at least the current one)
      we = free_words > ((owed == '0) ? CW'(1) : owed);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      owed      <= '0;
      exp_lv1   <= '0;
      dropped   <= 1'b0;
      eoe_valid <= 1'b0;
      eoe_lv1   <= '0;
      warn      <= 1'b0;
      err       <= 1'b0;
    end else if (flush) begin
      owed      <= '0;
      exp_lv1   <= '0;
      dropped   <= 1'b0;
      eoe_valid <= 1'b0;
      warn      <= 1'b0;
      err       <= 1'b0;
    end else begin
      eoe_valid <= 1'b0;
      warn      <= 1'b0;
      err       <= 1'b0;
      case ({lv1_sent, got_eoe && owed != '0})
        2'b10:   owed <= owed + 1'b1;
        2'b01:   owed <= owed - 1'b1;
        default: ;
      endcase
      if (rx_valid && !got_eoe && !we) dropped <= 1'b1;
      if (got_eoe) begin
        exp_lv1 <= exp_lv1 + 1'b1;
        dropped <= 1'b0;
        if (full) begin
          err <= 1'b1;
        end else begin
          eoe_valid <= 1'b1;
          eoe_lv1   <= exp_lv1;
          warn      <= flags[WNG_FE] | flags[WNG_OVF];
          err       <= flags[ERR_LV1];
        end
      end
    end
  end

  mcc_rx_fifo #(.DEPTH(DEPTH), .WIDTH(WORD_W)) u_fifo (
    .clk, .rst_n, .flush,
    .we, .wdata(wdata), .commit,
    .re,
    .rdata (rdata),
    .avail,
    .used,
    .full
  );

endmodule
