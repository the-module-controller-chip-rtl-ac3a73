// tb_mcc_event_builder: self-checking test of the event builder.
//
// The 16 input FIFOs are modelled by queues in the testbench. For each trigger
// the test pulses lv1_sent, fills the queues with a random event (0..4 hits per
// FE, some FE warnings, words with ToT when enabled), and reports each FIFO's
// end-of-event to the score board in random order and with random delays. The
// serial output is parsed by mcc_dto_monitor and compared bit for bit with the
// reference format of mcc_tb_pkg. Also covered: ToT format, masked FE inputs, the
// module warning after SYNC (sync_warn), a hit whose trigger number is wrong (FE
// error flag and hit_err), the pending-trigger order, event_done once per event,
// and that no event starts before the last FIFO has reported it.
module tb_mcc_event_builder;
  import mcc_pkg::*;
  import mcc_tb_pkg::*;

  logic clk = 0, rst_n = 0, flush = 0, tot_en = 0, lv1_sent = 0, sync_warn = 0, hold = 0;
  logic [15:0] mask = 0, avail, re, eoe_valid = 0, hit_err;
  logic [15:0][3:0] eoe_lv1 = 0;
  fifo_word_t rdata [16];
  logic event_done, idle, event_ready, dout;
  logic [7:0] lv1_count;
  int checks = 0, failures = 0;
  int n_done = 0, n_hit_err = 0, n_made = 0;

  fifo_word_t q [16][$];
  mcc_event expected[$];
  bit [15:0] exp_mask[$];
  bit exp_tot[$];

  mcc_event_builder dut (.*);
  mcc_dto_monitor mon (.clk, .tot_en, .din(dout && rst_n));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
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

  // FIFO models
  always_comb
    for (int f = 0; f < 16; f++) begin
      avail[f] = q[f].size() != 0;
      rdata[f] = (q[f].size() != 0) ? q[f][0] : '0;
    end
  always @(posedge clk) if (rst_n) begin
    for (int f = 0; f < 16; f++) if (re[f] && q[f].size() != 0) void'(q[f].pop_front());
    if (event_done) n_done++;
    n_hit_err += $countones(hit_err);
  end

  // one event: returns the reference; wrong_fe >= 0 puts a bad trigger number in a hit
  task automatic make_event(int n, int wrong_fe, bit mod_warn);
    automatic mcc_event ev = new(8'(n));
    automatic int order[16];
    ev.modflags = mod_warn ? 4'b0001 : 4'b0000;
    @(posedge clk) lv1_sent <= 1;
    @(posedge clk) lv1_sent <= 0;
    for (int f = 0; f < 16; f++) begin
      automatic int nh = (f == wrong_fe) ? $urandom_range(1, 4) : $urandom_range(0, 4);
      if (mask[f]) continue;
      for (int k = 0; k < nh; k++) begin
        automatic fifo_word_t w;
        w.lv1 = 4'(n);
        w.row = 8'($urandom_range(0, 159));
        w.col = 5'($urandom_range(0, 17));
        w.tot = tot_en ? 8'($urandom) : 8'h0;
        if (f == wrong_fe && k == 0) w.lv1 = 4'(n + 3);
        q[f].push_back(w);
        ev.hits[f].push_back(w);
      end
      if ($urandom_range(0, 9) == 0) ev.flags[f][WNG_FE] = 1;
      if (f == wrong_fe && nh > 0) ev.flags[f][ERR_LV1] = 1;
      q[f].push_back('{lv1: 4'(n), row: {4'hF, ev.flags[f] & 4'b0001}, col: 0, tot: 0});
    end
    expected.push_back(ev);
    n_made++;
    exp_mask.push_back(mask);
    exp_tot.push_back(tot_en);
    // report the end-of-event words in random order
    foreach (order[i]) order[i] = i;
    order.shuffle();
    foreach (order[i]) begin
      if (mask[order[i]]) continue;
      if (i == 15) begin
        repeat (20) @(posedge clk);
        // with no older event pending, nothing may be ready before the last FIFO
        if (n_done == n_made - 1) check("event must wait for the last FIFO", !event_ready);
      end
      @(posedge clk);
      eoe_valid <= 16'(1) << order[i];
      eoe_lv1[order[i]] <= 4'(n);
      @(posedge clk);
      eoe_valid <= 0;
    end
  endtask

  task automatic wait_idle();
    do @(posedge clk); while (!idle || event_ready);
    repeat (5) @(posedge clk);
  endtask

  task automatic compare_all();
    check("event count", mon.events.size() == expected.size());
    while (expected.size() != 0 && mon.raw.size() != 0) begin
      automatic mcc_event e = expected.pop_front();
      automatic bitq_t want = e.to_bits(exp_tot.pop_front(), exp_mask.pop_front());
      automatic bitq_t got = mon.raw.pop_front();
      void'(mon.events.pop_front());
      if (got != want) $display("want %s\n got %p\n exp %p", e.sprint(), got, want);
      check("event stream", got == want);
    end
    expected.delete();
    check("monitor parse errors", mon.errors == 0);
  endtask

  initial begin
    int n = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    // plain events, waiting for each
    for (int e = 0; e < 10; e++) begin
      make_event(n, -1, 0);
      n++;
      wait_idle();
    end
    compare_all();
    check("event_done per event", n_done == 10);
    // several events queued before building (pending triggers), with ToT
    tot_en <= 1;
    for (int e = 0; e < 6; e++) begin
      make_event(n, -1, 0);
      n++;
    end
    wait_idle();
    compare_all();
    // masked inputs
    tot_en <= 0;
    mask <= 16'hA0F1;
    for (int e = 0; e < 4; e++) begin
      make_event(n, -1, 0);
      n++;
    end
    wait_idle();
    compare_all();
    mask <= 0;
    // hit with a wrong trigger number
    make_event(n, 5, 0);
    n++;
    wait_idle();
    compare_all();
    check($sformatf("hit_err pulses %0d", n_hit_err), n_hit_err == 1);
    // module warning after SYNC: flush, then the next event carries the flag
    @(posedge clk) begin flush <= 1; sync_warn <= 1; end
    @(posedge clk) begin flush <= 0; sync_warn <= 0; end
    n = 0;
    make_event(n, -1, 1);
    n++;
    make_event(n, -1, 0);
    n++;
    wait_idle();
    compare_all();
    check("trigger counter after flush", lv1_count == 8'(n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
