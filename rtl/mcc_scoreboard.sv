// mcc_scoreboard: the event score board of the event builder.
//
// One row per FE trigger number (16 rows for the 4-bit number), one column per
// input FIFO. A receiver channel sets bit [lv1][fifo] when it has stored the
// end-of-event word of that event; the event builder asks whether the row of the
// event it wants to build is complete in every FIFO, and erases the row once the
// event is built. This follows the paper. Masked FE inputs count as complete
// (the mask register is the paper's; how it enters the score board is this
// design's choice).
//
// Interface: set[i] with set_lv1[i] marks FIFO i; several channels may set in the
// same clock. query_lv1 selects the row; ready is combinational. clear erases the
// row query_lv1 at the clock edge (a set to the same row in that clock wins).
// flush erases everything.
module mcc_scoreboard
  import mcc_pkg::*;
#(
  parameter int unsigned NFIFO = N_FE,
  parameter int unsigned LW    = LV1_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       flush,
  input  logic [NFIFO-1:0]           set,
  input  logic [NFIFO-1:0][LW-1:0]   set_lv1,
  input  logic [NFIFO-1:0]           mask,
  input  logic [LW-1:0]              query_lv1,
  input  logic                       clear,
  output logic                       ready,
  output logic [NFIFO-1:0]           row
);

  localparam int unsigned NROW = 1 << LW;

  logic [NFIFO-1:0] board [NROW];

  assign row   = board[query_lv1];
  assign ready = &(row | mask);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NROW; r++) board[r] <= '0;
    end else if (flush) begin
      for (int r = 0; r < NROW; r++) board[r] <= '0;
    end else begin
      if (clear) board[query_lv1] <= '0;
      for (int f = 0; f < NFIFO; f++)
        if (set[f]) board[set_lv1[f]][f] <= 1'b1;
    end
  end

endmodule
