// tb_mcc_ttc: self-checking test of the trigger, timing and control block.
//
// Checks: a trigger command gives one FE trigger one clock later; with a pattern
// length of k, k contiguous triggers; nothing while not taking data; the pending
// event counter rises per trigger and falls per event_done; triggers beyond the
// limit n are suppressed and counted; a ROD SYNC waits for the event builder to be
// idle with no complete event, then sends SYNC, flush and the warning together and
// clears the pending count; an error starts a SYNC only when auto-SYNC is on.
module tb_mcc_ttc;
  import mcc_pkg::*;

  logic clk = 0, rst_n = 0, run = 0, lv1_cmd = 0, sync_cmd = 0, autosync_en = 0, error = 0;
  logic event_done = 0, eb_idle = 1, eb_event_ready = 0;
  logic [3:0] max_pending = 15, burst_m1 = 0;
  logic lv1_out, sync_out, flush, sync_warn;
  logic [4:0] pending;
  logic [15:0] suppressed;
  int checks = 0, failures = 0;
  int n_lv1 = 0, n_sync = 0;
  int lv1_times[$];

  mcc_ttc dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    if (lv1_out) begin
      n_lv1++;
      lv1_times.push_back($time / 10);
    end
    if (sync_out) begin
      n_sync++;
      if (!(flush && sync_warn)) begin
        failures++;
        $display("SYNC without flush/warning");
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
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

  task automatic pulse_lv1();
    @(posedge clk) lv1_cmd <= 1;
    @(posedge clk) lv1_cmd <= 0;
  endtask

  task automatic done(int k);
    repeat (k) begin
      @(posedge clk) event_done <= 1;
      @(posedge clk) event_done <= 0;
    end
    @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // not taking data: suppressed
    pulse_lv1();
    repeat (5) @(posedge clk);
    check("no trigger outside data taking", n_lv1 == 0 && suppressed == 1);
    run <= 1;
    // single trigger, latency
    begin
      time t0;
      @(posedge clk) lv1_cmd <= 1;
      t0 = $time / 10;
      @(posedge clk) lv1_cmd <= 0;
      repeat (5) @(posedge clk);
      check("one trigger", n_lv1 == 1 && pending == 1);
      check("trigger latency", lv1_times[0] - t0 == 3);  // sampled 1, fired 2, seen 3
    end
    done(1);
    check("pending back to 0", pending == 0);
    // pattern of 4 contiguous triggers
    burst_m1 <= 3;
    lv1_times.delete();
    pulse_lv1();
    repeat (8) @(posedge clk);
    check("4 triggers", n_lv1 == 5 && pending == 4);
    check("contiguous", lv1_times.size() == 4 && lv1_times[3] - lv1_times[0] == 3);
    done(4);
    // limit n = 3: 6 requested, 3 sent, 3 suppressed
    max_pending <= 3;
    burst_m1 <= 0;
    repeat (6) begin
      pulse_lv1();
      repeat (3) @(posedge clk);
    end
    check("limit n", pending == 3 && n_lv1 == 8 && suppressed == 4);
    done(1);
    pulse_lv1();
    repeat (3) @(posedge clk);
    check("trigger after an event is done", pending == 3 && n_lv1 == 9);
    // ROD SYNC waits for the builder
    eb_idle <= 0;
    eb_event_ready <= 1;
    @(posedge clk) sync_cmd <= 1;
    @(posedge clk) sync_cmd <= 0;
    repeat (10) @(posedge clk);
    check("SYNC waits for builder", n_sync == 0);
    pulse_lv1();
    repeat (3) @(posedge clk);
    check("no trigger while SYNC pending", n_lv1 == 9);
    eb_idle <= 1;
    eb_event_ready <= 0;
    repeat (3) @(posedge clk);
    check("SYNC waits for pending events", n_sync == 0 && pending == 3);
    done(3);
    repeat (3) @(posedge clk);
    check("SYNC sent", n_sync == 1 && pending == 0);
    // error without / with auto-SYNC
    @(posedge clk) error <= 1;
    @(posedge clk) error <= 0;
    repeat (5) @(posedge clk);
    check("no auto-SYNC when disabled", n_sync == 1);
    autosync_en <= 1;
    @(posedge clk) error <= 1;
    @(posedge clk) error <= 0;
    repeat (5) @(posedge clk);
    check("auto-SYNC on error", n_sync == 2);
    // an event that never completes: SYNC goes out after the time-out
    run <= 1;
    pulse_lv1();
    repeat (3) @(posedge clk);
    @(posedge clk) sync_cmd <= 1;
    @(posedge clk) sync_cmd <= 0;
    repeat (4090) @(posedge clk);
    check("SYNC still waiting for the pending event", n_sync == 2 && pending == 1);
    repeat (20) @(posedge clk);
    check("SYNC after the time-out", n_sync == 3 && pending == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
