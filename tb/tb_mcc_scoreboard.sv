// tb_mcc_scoreboard: self-checking test of the event score board.
//
// Random end-of-event marks from 16 FIFOs for random trigger numbers, with a
// random FE mask, are compared with a bit-array model: ready for the queried row
// must be high exactly when every unmasked FIFO has marked it; clear erases only
// that row; flush erases all rows.
module tb_mcc_scoreboard;
  logic clk = 0, rst_n = 0, flush = 0, clear = 0, ready;
  logic [15:0] set = 0, mask = 0, row;
  logic [15:0][3:0] set_lv1 = 0;
  logic [3:0] query_lv1 = 0;
  bit [15:0] model [16];
  int checks = 0, failures = 0;

  mcc_scoreboard dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[r]) model[r] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      if (i % 1000 == 0) mask = (i == 0) ? 16'h0 : 16'($urandom) & 16'($urandom);
      query_lv1 = 4'($urandom);
      #1;
      checks++;
      if (row !== model[query_lv1] || ready !== &(model[query_lv1] | mask)) begin
        failures++;
        $display("row %0d: got %h/%b want %h", query_lv1, row, ready, model[query_lv1]);
      end
      set   = 16'($urandom) & 16'($urandom);
      for (int f = 0; f < 16; f++) set_lv1[f] = 4'($urandom_range(0, 3));
      clear = $urandom_range(0, 7) == 0;
      flush = $urandom_range(0, 499) == 0;
      @(posedge clk);
      #1;
      if (flush) foreach (model[r]) model[r] = 0;
      else begin
        if (clear) model[query_lv1] = 0;
        for (int f = 0; f < 16; f++) if (set[f]) model[set_lv1[f]][f] = 1;
      end
      set = 0; clear = 0; flush = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
