// tb_mcc_fe_rx: self-checking test of the FE link receiver.
//
// Sends random hit and end-of-event words, 18-bit and 26-bit (ToT), separated by
// random idle gaps, and checks every received word against what was sent and that
// word_valid comes exactly one clock after the last bit. Then sends a corrupted
// fragment followed by a long idle gap and checks that the receiver is back in step.
module tb_mcc_fe_rx;
  import mcc_pkg::*;

  logic clk = 0, rst_n = 0, flush = 0, tot_en = 0, din = 0;
  logic word_valid;
  fifo_word_t word;
  int checks = 0, failures = 0;
  fifo_word_t exp_q[$];
  time last_bit_time[$];
  bit ignore_next = 0;

  mcc_fe_rx dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker
  always @(posedge clk) if (word_valid) begin
    fifo_word_t e;
    time lc;
    checks++;
    if (ignore_next) begin
      ignore_next = 0;
    end else if (exp_q.size() == 0) begin
      failures++;
      $display("unexpected word %h", word);
    end else begin
      e = exp_q.pop_front();
      lc = last_bit_time.pop_front();
      if (word !== e) begin
        failures++;
        $display("word %h expected %h", word, e);
      end
      checks++;
      if ($time - lc != 20) begin   // valid in the clock after the last bit
        failures++;
        $display("latency %0t", $time - lc);
      end
    end
  end

  task automatic send(fifo_word_t w, bit tot);
    bit [25:0] b;
    int n = tot ? 26 : 18;
    b = tot ? {1'b1, w} : {8'b0, 1'b1, w.lv1, w.row, w.col};
    for (int i = n - 1; i >= 0; i--) begin
      @(posedge clk);
      din <= b[i];
    end
    if (!tot) w.tot = 0;
    exp_q.push_back(w);
    last_bit_time.push_back($time);
    @(posedge clk);
    din <= 0;
    repeat ($urandom_range(0, 5)) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int m = 0; m < 2; m++) begin
      @(posedge clk);
      tot_en <= m[0];
      @(posedge clk);
      for (int k = 0; k < 150; k++) begin
        fifo_word_t w;
        w = fifo_word_t'({$urandom, $urandom});
        if (k % 5 == 4) w.row = {4'hF, 4'($urandom)};
        send(w, m[0]);
      end
    end
    // corrupted fragment: a header and half a word, then a long idle gap
    repeat (5) @(posedge clk);
    ignore_next = 1;
    @(posedge clk) din <= 1;
    @(posedge clk) din <= 0;
    @(posedge clk) din <= 1;
    @(posedge clk) din <= 0;
    repeat (40) @(posedge clk);
    // the fragment completes into one garbage word, which the checker skips
    checks++;
    if (exp_q.size() != 0 || ignore_next) begin
      failures++;
      $display("words missing");
    end
    repeat (30) @(posedge clk);
    send(fifo_word_t'(25'h1ABCDEF), 1);
    repeat (10) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("not back in step after the gap");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
