// mcc_rx_fifo: derandomizing input FIFO of one receiver channel.
//
// 32 words of 25 bits, as in the paper, with three pointers: W.PTR (next word to
// write), L.PTR (one past the last end-of-event word written) and R.PTR (next word
// to read). The reader only sees words below L.PTR, so it can never read into an
// event that is still arriving: R.PTR never overtakes L.PTR. The paper builds this
// memory full custom; here it is a plain array.
//
// Interface: we writes wdata at W.PTR. commit copies W.PTR into L.PTR; given with
// we, L.PTR takes the pointer just past the word written, so an end-of-event word is
// committed together with the event it closes. re advances R.PTR; rdata always
// shows the word at R.PTR (first word fall through) and is valid while avail is
// high. used counts all stored words, committed or not. flush empties the FIFO.
// Writes to a full FIFO and reads with avail low are ignored (and flagged by
// assertions). Timing: a word written in one clock can be read from the next
// clock once committed.
module mcc_rx_fifo #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned WIDTH = 25
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     flush,
  input  logic                     we,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     commit,
  input  logic                     re,
  output logic [WIDTH-1:0]         rdata,
  output logic                     avail,
  output logic [$clog2(DEPTH):0]   used,
  output logic                     full
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, lptr, rptr;   // one extra bit tells full from empty

  assign used  = wptr - rptr;
  assign full  = used == (AW+1)'(DEPTH);
  assign avail = lptr != rptr;
  assign rdata = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (we && !full) mem[wptr[AW-1:0]] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      lptr <= '0;
      rptr <= '0;
    end else if (flush) begin
      wptr <= '0;
      lptr <= '0;
      rptr <= '0;
    end else begin
      if (we && !full) wptr <= wptr + 1'b1;
      if (commit)      lptr <= (we && !full) ? wptr + 1'b1 : wptr;
      if (re && avail) rptr <= rptr + 1'b1;
    end
  end

  // Pointer rules: the channel never writes a full FIFO, the builder never reads past L.PTR.
  a_no_overwrite : assert property (@(posedge clk) disable iff (!rst_n) !(we && full && !flush))
    else $error("mcc_rx_fifo: write to a full FIFO");
  a_no_overread : assert property (@(posedge clk) disable iff (!rst_n) !(re && !avail && !flush))
    else $error("mcc_rx_fifo: read beyond L.PTR");

endmodule
