// mcc_transmitter: serial transmitter of the MCC's output data stream (DTO).
//
// The event builder hands over one field at a time: a bit string of up to
// FIELD_MAX bits, right aligned, with its length. The transmitter sends it MSB
// first, one bit per clock, and chains fields without a gap, so an event leaves
// as one unbroken bit string. Between events the line idles at 0. One field can
// wait in a holding register while the previous one is being sent, which gives
// the builder a whole field time (at least 9 clocks) to prepare the next one.
// The serial transmitter is the paper's; the field handshake is this design's.
//
// Interface: valid/ready handshake on (len, bits); len must be 1..FIELD_MAX, and
// fields of at least 2 bits are needed for back-to-back fields to leave no gap.
// dout is registered: the first bit of a field accepted while the line is idle
// appears two clocks after the handshake. busy is high while anything is queued
// or being sent.
module mcc_transmitter
  import mcc_pkg::*;
#(
  parameter int unsigned FW = FIELD_MAX
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic [$clog2(FW+1)-1:0] in_len,
  input  logic [FW-1:0]          in_bits,
  output logic                   dout,
  output logic                   busy
);

  localparam int unsigned LW = $clog2(FW+1);

  logic [FW-1:0] sh, nx_bits;
  logic [LW-1:0] cnt, nx_len;
  logic          nx_valid;
  logic          take_next;

  assign in_ready  = !nx_valid;
  assign busy      = nx_valid || cnt != '0;
  assign take_next = nx_valid && cnt <= LW'(1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh       <= '0;
      cnt      <= '0;
      nx_bits  <= '0;
      nx_len   <= '0;
      nx_valid <= 1'b0;
      dout     <= 1'b0;
    end else begin
      dout <= (cnt != '0) ? sh[cnt-LW'(1)] : 1'b0;
      if (cnt != '0) cnt <= cnt - LW'(1);
      if (take_next) begin
        sh  <= nx_bits;
        cnt <= nx_len;
      end
      if (in_valid && in_ready) begin
        nx_bits  <= in_bits;
        nx_len   <= in_len;
        nx_valid <= 1'b1;
      end else if (take_next) begin
        nx_valid <= 1'b0;
      end
    end
  end

  a_len : assert property (@(posedge clk) disable iff (!rst_n)
                           in_valid |-> (in_len != '0 && in_len <= LW'(FW)))
    else $error("mcc_transmitter: bad field length");

endmodule
