// tb_mcc_rx_fifo: self-checking test of the three-pointer input FIFO.
//
// Random writes, commits and reads against a queue model. The model keeps how
// many words are committed (below L.PTR); the test checks that avail is high
// exactly when a committed word is waiting, that rdata is the oldest word, that
// used/full follow the number of stored words, that reads never pass L.PTR and
// that flush empties the FIFO.
module tb_mcc_rx_fifo;
  logic clk = 0, rst_n = 0, flush = 0, we = 0, commit = 0, re = 0;
  logic [24:0] wdata = 0, rdata;
  logic avail, full;
  logic [5:0] used;
  int checks = 0, failures = 0;
  logic [24:0] model[$];
  int committed = 0;

  mcc_rx_fifo #(.DEPTH(32), .WIDTH(25)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("%t %s", $time, what);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 4000; i++) begin
      bit do_we, do_commit, do_re, do_flush;
      @(negedge clk);
      // compare outputs against the model
      check("avail", avail == (committed > 0));
      check("used", used == 6'(model.size()));
      check("full", full == (model.size() == 32));
      if (committed > 0) check("rdata", rdata == model[0]);
      do_we     = ($urandom_range(0, 99) < ((i / 500) % 2 ? 70 : 40)) && model.size() < 32;
      do_commit = $urandom_range(0, 3) == 0;
      do_re     = $urandom_range(0, 1) && committed > 0;
      do_flush  = $urandom_range(0, 999) == 0;
      we     = do_we;
      wdata  = 25'($urandom);
      commit = do_commit;
      re     = do_re;
      flush  = do_flush;
      @(posedge clk);
      #1;
      we = 0; commit = 0; re = 0; flush = 0;
      if (do_flush) begin
        model.delete();
        committed = 0;
      end else begin
        if (do_re) begin
          void'(model.pop_front());
          committed--;
        end
        if (do_we) model.push_back(wdata);
        if (do_commit) committed = model.size();
      end
    end
    // fill completely and check that nothing is readable before the commit
    flush = 1; @(posedge clk); #1 flush = 0;
    for (int k = 0; k < 32; k++) begin
      we = 1; wdata = 25'(k); @(posedge clk); #1;
    end
    we = 0;
    check("full after 32 writes", full && used == 32);
    check("no read before commit", !avail);
    commit = 1; @(posedge clk); #1 commit = 0;
    for (int k = 0; k < 32; k++) begin
      check("drain order", avail && rdata == 25'(k));
      re = 1; @(posedge clk); #1;
    end
    re = 0;
    check("empty after drain", !avail && used == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
