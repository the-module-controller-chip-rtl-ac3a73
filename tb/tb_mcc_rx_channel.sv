// tb_mcc_rx_channel: self-checking test of one receiver channel.
//
// Serial FE words are sent into the channel and the FIFO is read back and compared
// with the expected words. Covered: normal events with and without ToT; a FIFO
// overflow (40 hits while the FIFO is not read), where the channel must keep
// 31 hits, drop the rest and flag WNG#1 on the end-of-event word; an FE warning;
// an end-of-event word with an unexpected trigger number (error bit and err
// pulse); an end-of-event that finds the FIFO full (err pulse, score board not
// told); flush. The score board report (eoe_valid, eoe_lv1) is checked per event.
module tb_mcc_rx_channel;
  import mcc_pkg::*;

  logic clk = 0, rst_n = 0, flush = 0, tot_en = 0, masked = 0, din = 0, lv1_sent = 0, re = 0;
  fifo_word_t rdata;
  logic avail, eoe_valid, warn, err;
  logic [3:0] eoe_lv1;
  int checks = 0, failures = 0;
  fifo_word_t exp_q[$];
  int exp_eoe[$];
  int n_warn = 0, n_err = 0;
  bit reading = 1;

  mcc_rx_channel dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("%t %s", $time, what);
    end
  endtask

  // reader: compare every word read with the expected queue
  always @(posedge clk) if (rst_n) begin
    if (re && avail) begin
      check("unexpected word", exp_q.size() != 0);
      if (exp_q.size() != 0) begin
        automatic fifo_word_t e = exp_q.pop_front();
        if (rdata !== e) $display("got %h want %h", rdata, e);
        check("fifo word", rdata === e);
      end
    end
    if (eoe_valid) begin
      check("unexpected eoe", exp_eoe.size() != 0);
      if (exp_eoe.size() != 0) check("eoe lv1", eoe_lv1 == 4'(exp_eoe.pop_front()));
    end
    if (warn) n_warn++;
    if (err) n_err++;
  end
  always @(negedge clk) re <= reading && avail && $urandom_range(0, 1);

  task automatic send(fifo_word_t w);
    bit [25:0] b = tot_en ? {1'b1, w} : {8'b0, 1'b1, w.lv1, w.row, w.col};
    int n = tot_en ? 26 : 18;
    for (int i = n - 1; i >= 0; i--) begin
      @(posedge clk);
      din <= b[i];
    end
    @(posedge clk);
    din <= 0;
    repeat ($urandom_range(0, 3)) @(posedge clk);
  endtask

  function automatic fifo_word_t eoe_word(int lv1, bit [3:0] flags);
    fifo_word_t w = '0;
    w.lv1 = 4'(lv1);
    w.row = {4'hF, flags};
    return w;
  endfunction

  task automatic trigger();
    @(posedge clk) lv1_sent <= 1;
    @(posedge clk) lv1_sent <= 0;
  endtask

  // one event: nh hits stored, nd more dropped
  task automatic event_(int n, int nh, int nd, bit [3:0] fe_flags, int sent_lv1, bit [3:0] exp_flags);
    trigger();
    for (int k = 0; k < nh + nd; k++) begin
      fifo_word_t w = fifo_word_t'({$urandom, $urandom});
      w.lv1 = 4'(n);
      w.row = 8'($urandom_range(0, 159));
      if (!tot_en) w.tot = 0;
      if (k < nh) exp_q.push_back(w);
      send(w);
    end
    exp_q.push_back(eoe_word(n, exp_flags));
    exp_eoe.push_back(n);
    send(eoe_word(sent_lv1, fe_flags));
  endtask

  task automatic drain();
    reading = 1;
    repeat (200) @(posedge clk);
    check("all words read", exp_q.size() == 0 && exp_eoe.size() == 0);
  endtask

  initial begin
    int n = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // normal events, both formats
    for (int m = 0; m < 2; m++) begin
      tot_en <= m[0];
      for (int e = 0; e < 20; e++) begin
        event_(n, $urandom_range(0, 6), 0, 0, n, 0);
        n++;
      end
      drain();
    end
    check("no warnings in normal events", n_warn == 0 && n_err == 0);
    // overflow: reader stopped, 40 hits, 31 fit (one word kept for the EoE)
    reading = 0;
    event_(n, 31, 9, 0, n, 4'b0010);
    n++;
    drain();
    check("overflow warning", n_warn == 1);
    // FE warning passed on
    event_(n, 2, 0, 4'b0001, n, 4'b0001);
    n++;
    drain();
    check("FE warning", n_warn == 2);
    // wrong trigger number in the EoE
    event_(n, 1, 0, 0, n + 5, 4'b0100);
    n++;
    drain();
    check("trigger number error", n_err == 1);
    // EoE finding a full FIFO: no trigger pending, 31 hits + EoE fill it
    reading = 0;
    for (int k = 0; k < 31; k++) begin
      automatic fifo_word_t w = '0;
      w.lv1 = 4'(n);
      w.row = 8'(k);
      exp_q.push_back(w);
      send(w);
    end
    exp_q.push_back(eoe_word(n, 0));
    exp_eoe.push_back(n);
    send(eoe_word(n, 0));
    n++;
    send(eoe_word(n, 0));   // lost
    n++;
    drain();
    check("lost EoE error", n_err == 2);
    // flush empties the FIFO
    reading = 0;
    trigger();
    begin
      automatic fifo_word_t w = '0;
      send(w);
      exp_eoe.push_back(n);
      send(eoe_word(n, 0));
    end
    repeat (5) @(posedge clk);
    check("event stored before flush", avail);
    @(posedge clk) flush <= 1;
    @(posedge clk) flush <= 0;
    @(posedge clk);
    check("flush empties", !avail);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
