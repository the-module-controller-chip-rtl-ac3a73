// mcc_fe_rx: serial receiver for the data link of one front-end (FE) chip.
//
// The FE pushes hits as serial words, one bit per 40 MHz clock, separated by any
// number of zeros. A word starts with a header bit 1, followed MSB first by the
// 4-bit trigger number, 8 row bits (or the end-of-event / warning code), 5 column
// bits and, when time-over-threshold is on, 8 ToT bits: 18 or 26 bits in all, as
// the paper describes. Between words the line is idle at 0, so after any bit error
// the receiver falls back in step once the line has been idle for longer than a
// word.
//
// Interface: din is sampled every clock. tot_en selects the 26-bit format; it must
// only change while the link is idle. When the last bit of a word has been
// sampled, word_valid pulses for one clock with the word (header stripped, ToT
// zero without ToT) in word. flush returns the receiver to idle.
// Timing: word_valid comes one clock after the last bit is on din.
module mcc_fe_rx
  import mcc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       flush,
  input  logic       tot_en,
  input  logic       din,
  output logic       word_valid,
  output fifo_word_t word
);

  logic [WORD_W-1:0] shreg;
  logic [4:0]        remaining;   // payload bits still to come, 0 = idle
  logic              busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg      <= '0;
      remaining  <= '0;
      busy       <= 1'b0;
      word_valid <= 1'b0;
      word       <= '0;
    end else begin
      word_valid <= 1'b0;
      if (flush) begin
        busy      <= 1'b0;
        remaining <= '0;
      end else if (!busy) begin
        if (din) begin
          busy      <= 1'b1;
          remaining <= tot_en ? 5'(HIT_BITS_T - 1) : 5'(HIT_BITS - 1);
          shreg     <= '0;
        end
      end else begin
        shreg     <= {shreg[WORD_W-2:0], din};
        remaining <= remaining - 5'd1;
        if (remaining == 5'd1) begin
          busy       <= 1'b0;
          word_valid <= 1'b1;
          if (tot_en) word <= fifo_word_t'({shreg[WORD_W-2:0], din});
          else        word <= fifo_word_t'({shreg[HIT_BITS-3:0], din, TOT_W'(0)});
        end
      end
    end
  end

endmodule
