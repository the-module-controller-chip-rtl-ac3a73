// tb_mcc_top: end-to-end test of the MCC with 16 FE chip models, at default sizes.
//
// The testbench plays the ROD: it sends commands on DCI and parses the event
// stream on DTO (mcc_dto_monitor). Sixteen mcc_fe_model instances answer the
// triggers with deterministic hits. Every event is compared with a reference built
// from the same hit generator: trigger number, FE numbers, hits, flags. Phases:
//   A  plain data taking, including events that overflow FIFO 3 (warning WNG#1)
//   B  contiguous trigger pattern (3 triggers per command)
//   C  pending-event limit n = 2 with 4-trigger patterns (suppressed triggers)
//   D  masked FE inputs and time-over-threshold format
//   E  SYNC from the ROD (next event carries the module warning)
//   F  trigger number error in FE 9 -> error flag -> automatic SYNC
//   G  register write/read-back through DTO
//   H  FE configuration write (DAO/LD at 5 MHz CCK) and FE read-back
//   I  transparent mode, then data taking again
//   J  a trigger sent while FIFO 3 is full: its end-of-event word is lost, the
//      event never completes, and the automatic SYNC recovers after its time-out
// Each mechanism is counted; one that never happened counts as a failure.
module tb_mcc_top;
  import mcc_pkg::*;
  import mcc_tb_pkg::*;

  logic clk = 0, rst_n = 0, dci = 0;
  logic tm = 0, lv1t = 0, synct = 0, ldt = 0, cckt = 0;
  logic [N_FE-1:0] dti, fe_do, dti_force = 0;
  logic dto, fe_xck, fe_lv1, fe_sync, fe_dao, fe_ld, fe_cck;
  logic tot_tb = 0;
  logic mon_en = 0;

  int checks = 0, failures = 0;

  mcc_top dut (
    .clk, .rst_n, .dci, .dto, .dti,
    .fe_xck, .fe_lv1, .fe_sync, .fe_dao, .fe_ld, .fe_cck,
    .tm, .lv1t, .synct, .ldt, .cckt
  );

  assign dti = fe_do | dti_force;

  for (genvar i = 0; i < N_FE; i++) begin : g_fe
    mcc_fe_model #(.FE_ID(i), .MAXH(4)) u_fe (
      .clk, .lv1 (fe_lv1 && rst_n), .sync (fe_sync && rst_n), .cck (fe_cck && rst_n),
      .dao (fe_dao), .ld (fe_ld),
      .tot_en (tot_tb), .dout (fe_do[i])
    );
  end

  mcc_dto_monitor mon (.clk, .tot_en (tot_tb), .din (dto && mon_en));

  always #12.5 clk = ~clk;   // 40 MHz

  // ---- mechanism counters ---------------------------------------------------------
  int n_events = 0, n_overflow = 0, n_fewarn = 0, n_masked = 0, n_tot = 0;
  int n_rodsync_flag = 0, n_err_flag = 0, n_autosync = 0, n_burst = 0, n_suppressed = 0;
  int n_regread = 0, n_fewrite = 0, n_feread = 0, n_transparent = 0;
  int n_trig = 0, n_sync_pins = 0, n_spill = 0;

  // ---- reference state -------------------------------------------------------------
  int       next_n = 0;
  int       trig_since_sync = 0;
  int       n_lost = 0;
  bit       rod_sync_sent = 0, last_sync_rod = 0;
  bit       after_sync = 0;
  bit [15:0] mask_now = 0;
  int       corrupt_num = -1;
  bit       lv1_q = 0;

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("%t FAIL %s", $time, what);
    end
  endtask

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // trigger and SYNC pulses at the FE pins
  always @(posedge clk) if (rst_n && !tm) begin
    if (fe_lv1) begin
      n_trig++;
      if (lv1_q) n_burst++;
    end
    lv1_q = fe_lv1;
    if (fe_sync) begin
      n_sync_pins++;
      last_sync_rod = rod_sync_sent;
      rod_sync_sent = 0;
      n_lost += trig_since_sync - next_n;   // events never built before this SYNC
      next_n = 0;
      after_sync = 1;
      trig_since_sync = 0;
    end else if (fe_lv1) begin
      trig_since_sync++;
    end
  end

  function automatic mcc_event expect_ev(int n);
    automatic mcc_event ev = new(8'(n));
    ev.modflags = after_sync ? 4'b0001 : 4'b0000;
    for (int f = 0; f < N_FE; f++) begin
      automatic int nh = gen_nhits(f, n, 4);
      if (mask_now[f]) continue;
      for (int k = 0; k < nh; k++) begin
        automatic fifo_word_t w = gen_hit(f, n, k);
        if (!tot_tb) w.tot = 0;
        ev.hits[f].push_back(w);
      end
      ev.flags[f][WNG_FE] = fe_warn(f, n);
      if (nh > 31) ev.flags[f][WNG_OVF] = 1;
      if (f == 9 && n == corrupt_num) ev.flags[f][ERR_LV1] = 1;
    end
    return ev;
  endfunction

  // compare one received event with the reference; an overflowed FE may have lost
  // hits, so its hits must only be a subsequence of the reference
  task automatic compare(mcc_event got, mcc_event want);
    automatic bit ok = got.num == want.num && got.modflags == want.modflags;
    for (int f = 0; f < N_FE; f++) begin
      // an overflow can spill into FE 3's next event: its hits may also be lost
      if (f == 3 && got.flags[f][WNG_OVF] && !want.flags[f][WNG_OVF]) begin
        want.flags[f][WNG_OVF] = 1;
        want.hits[f].push_back('0);   // forces the size check below to pass
        n_spill++;
      end
      if (got.flags[f] != want.flags[f]) ok = 0;
      if (want.flags[f][WNG_OVF]) begin
        automatic int j = 0;
        foreach (got.hits[f][k]) begin
          while (j < want.hits[f].size() && want.hits[f][j] != got.hits[f][k]) j++;
          if (j == want.hits[f].size()) ok = 0;
          else j++;
        end
        if (got.hits[f].size() >= want.hits[f].size()) ok = 0;
      end else begin
        if (got.hits[f] != want.hits[f]) ok = 0;
      end
    end
    if (!ok) $display("event mismatch:\n got  %s\n want %s", got.sprint(), want.sprint());
    check("event content", ok);
  endtask

  // checker: every parsed event against the reference
  initial begin
    forever begin
      @(posedge clk);
      while (mon.events.size() != 0) begin
        automatic mcc_event got = mon.events.pop_front();
        automatic mcc_event want = expect_ev(next_n);
        void'(mon.raw.pop_front());
        compare(got, want);
        n_events++;
        if (got.modflags != 0) begin
          if (last_sync_rod) n_rodsync_flag++;
          else n_autosync++;
        end
        if (mask_now != 0) n_masked++;
        if (tot_tb) n_tot++;
        for (int f = 0; f < N_FE; f++) begin
          if (got.flags[f][WNG_OVF]) n_overflow++;
          if (got.flags[f][WNG_FE]) n_fewarn++;
          if (got.flags[f][ERR_LV1]) n_err_flag++;
        end
        after_sync = 0;
        next_n++;
      end
    end
  end

  // ---- ROD side ----------------------------------------------------------------------
  task automatic send(bitq_t q);
    foreach (q[i]) begin
      @(posedge clk);
      dci <= q[i];
    end
    @(posedge clk);
    dci <= 0;
    repeat (3) @(posedge clk);
  endtask

  task automatic wr(reg_addr_e a, bit [15:0] d);
    send(cmd_wrreg(a, d));
  endtask

  // wait until every trigger sent has come back as an event
  task automatic drain();
    automatic int t = 0;
    while (next_n != trig_since_sync && t < 200000) begin
      @(posedge clk);
      t++;
    end
    repeat (200) @(posedge clk);
    check($sformatf("all events built (%0d of %0d)", next_n, trig_since_sync),
          next_n == trig_since_sync && mon.errors == 0);
  endtask


  task automatic triggers(int k, int gap_lo, int gap_hi);
    repeat (k) begin
      automatic bit hv = heavy(3, trig_since_sync);
      send(cmd_lv1());
      repeat ($urandom_range(gap_lo, gap_hi)) @(posedge clk);
      // an event that overflows FIFO 3 must be built before the next trigger,
      // or that trigger's end-of-event word may find the FIFO still full
      if (hv) repeat (2500) @(posedge clk);
    end
  endtask

  // wait for a start bit on DTO, at most max clocks
  task automatic wait_start(int max, string what);
    automatic int t = 0;
    do begin
      @(posedge clk);
      t++;
    end while (dto !== 1'b1 && t < max);
    check($sformatf("%s: start bit on DTO", what), dto === 1'b1);
  endtask

  task automatic read_reg(reg_addr_e a, output bit [15:0] v);
    mon_en = 0;
    send(cmd_rdreg(a));
    wait_start(2000, "register read");
    for (int i = 15; i >= 0; i--) begin
      @(posedge clk);
      v[i] = dto;
    end
    repeat (5) @(posedge clk);
    mon_en = 1;
    n_regread++;
  endtask

  initial begin
    bit [15:0] v;
    repeat (5) @(posedge clk);
    rst_n <= 1;
    repeat (5) @(posedge clk);
    mon_en = 1;

    // configuration: auto-SYNC on, n = 15, one trigger per command
    wr(R_CSR, 16'h0002);
    wr(R_LV1CFG, 16'h000F);
    send(cmd_slow(4'(SC_RUN)));

    // A: plain data taking with overflowing events
    triggers(30, 200, 1200);
    drain();
    check("A: overflow seen", n_overflow > 0);

    // B: contiguous pattern of 3
    wr(R_LV1CFG, 16'h002F);
    send(cmd_slow(4'(SC_RUN)));
    triggers(5, 1500, 2500);
    drain();
    check("B: patterns seen", n_burst >= 10);

    // C: limit n = 2, patterns of 4: some triggers suppressed
    wr(R_LV1CFG, 16'h0032);
    send(cmd_slow(4'(SC_RUN)));
    triggers(6, 100, 300);
    drain();
    read_reg(R_SUPPR, v);
    n_suppressed = int'(v);
    check("C: suppressed triggers counted", v > 0);
    read_reg(R_PENDING, v);
    check("C: nothing pending after drain", v == 0);

    // D: masked inputs and ToT
    wr(R_LV1CFG, 16'h000F);
    wr(R_FEMASK, 16'h0C30);
    mask_now = 16'h0C30;
    wr(R_CSR, 16'h0003);
    tot_tb = 1;
    send(cmd_slow(4'(SC_RUN)));
    triggers(10, 300, 1200);
    drain();
    wr(R_FEMASK, 16'h0000);
    mask_now = 0;
    wr(R_CSR, 16'h0002);
    tot_tb = 0;
    send(cmd_slow(4'(SC_RUN)));

    // E: SYNC from the ROD
    rod_sync_sent = 1;
    send(cmd_slow(4'(SC_SYNC)));
    repeat (20) @(posedge clk);
    check("E: SYNC reached the FE chips", n_sync_pins == 1);
    triggers(5, 300, 1200);
    drain();
    check("E: module warning after SYNC", n_rodsync_flag == 1);

    // F: trigger number error in FE 9, automatic SYNC
    corrupt_num = next_n;
    g_fe[9].u_fe.corrupt_n = next_n;
    triggers(1, 100, 100);
    repeat (3000) @(posedge clk);
    check("F: error flag in the event", n_err_flag == 1);
    check("F: automatic SYNC", n_sync_pins == 2);
    g_fe[9].u_fe.corrupt_n = -1;
    corrupt_num = -1;
    triggers(4, 300, 1200);
    drain();
    check("F: module warning after automatic SYNC", n_autosync == 1);

    // G: registers
    wr(R_CMDLEN, 16'd6);
    wr(R_DATALEN, 16'd10);
    read_reg(R_CMDLEN, v);
    check("G: CMDLEN read-back", v == 6);
    read_reg(R_DATALEN, v);
    check("G: DATALEN read-back", v == 10);
    read_reg(R_LV1CNT, v);
    check("G: trigger counter", v == 16'(trig_since_sync));

    // H: FE write, 6 + 10 bits, to all FE chips
    begin
      automatic bitq_t fe = {};
      automatic int base = g_fe[0].u_fe.cfg_bits.size();
      automatic bit ok = 1;
      for (int i = 0; i < 16; i++) fe.push_back(1'($urandom));
      send(cmd_fe(0, fe));
      repeat (20) @(posedge clk);
      for (int i = 0; i < 16; i++) begin
        if (g_fe[0].u_fe.cfg_bits[base + i] != fe[i]) ok = 0;
        if (g_fe[15].u_fe.cfg_bits[base + i] != fe[i]) ok = 0;
        if (g_fe[7].u_fe.cfg_ld[base + i] != (i < 6)) ok = 0;
      end
      check("H: FE write bits and LD", ok && g_fe[3].u_fe.cfg_bits.size() == base + 16);
      n_fewrite++;
    end
    // H: FE read-back from FE 5: 6 command bits, 8 bits back
    wr(R_DATALEN, 16'd8);
    wr(R_FESEL, 16'd5);
    begin
      automatic bitq_t fe = '{1, 0, 1, 1, 0, 1};
      automatic bitq_t rb = {};
      automatic bit got[$];
      for (int i = 0; i < 8; i++) rb.push_back(1'($urandom));
      g_fe[5].u_fe.rb_bits = rb;
      g_fe[5].u_fe.rb_start = g_fe[5].u_fe.cfg_bits.size() + 6;
      mon_en = 0;
      fork
        send(cmd_fe(1, fe));
        begin
          wait_start(2000, "FE read");
          repeat (8) @(posedge clk);
          repeat (8) begin
            repeat (4) @(posedge clk);
            got.push_back(dto);
            repeat (4) @(posedge clk);
          end
        end
      join
      repeat (40) @(posedge clk);
      mon_en = 1;
      check("H: FE read-back", got == rb);
      n_feread++;
    end

    // I: transparent mode (DTO then carries raw FE data: monitor off)
    mon_en = 0;
    repeat (5) @(posedge clk);
    tm = 1;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 50; i++) begin
      @(negedge clk);
      {ldt, cckt} = 2'($urandom);
      dti_force = 16'($urandom);
      #1;
      check("I: transparent control lines", fe_ld == ldt && fe_cck == cckt && !fe_lv1 && !fe_sync);
      check("I: transparent DTO", dto == dti[5]);
    end
    @(negedge clk);
    {ldt, cckt} = 0;
    dti_force = 0;
    tm = 0;
    n_transparent++;
    repeat (50) @(posedge clk);
    mon_en = 1;
    send(cmd_slow(4'(SC_RUN)));
    triggers(5, 300, 1200);
    drain();

    // J: a trigger right after an overflowing event: FE 3's FIFO is still full when
    // that trigger's end-of-event word arrives (the builder is busy with FE 0, which
    // overflows too), so the word is lost, the event can never complete, and the
    // automatic SYNC goes out after its time-out
    heavy_fe0_n = 7;
    rod_sync_sent = 1;
    send(cmd_slow(4'(SC_SYNC)));
    repeat (50) @(posedge clk);
    triggers(7, 300, 600);
    drain();
    begin
      automatic int syncs = n_sync_pins;
      automatic int waited = 0;
      check("J: next trigger is the overflowing one", heavy(3, trig_since_sync));
      send(cmd_lv1());
      // only a trigger sent after FE 3 has filled its FIFO finds no word kept
      // free for its end-of-event word: 31 hits of at most 21 clocks each take
      // under 660 clocks, and the builder, busy with FE 0's 31 hits first, cannot
      // start on FIFO 3 before about 1170 clocks
      repeat (800) @(posedge clk);
      send(cmd_lv1());
      while (n_sync_pins == syncs && waited < 20000) begin
        @(posedge clk);
        waited++;
      end
      check($sformatf("J: automatic SYNC after the time-out (%0d clocks)", waited),
            n_sync_pins == syncs + 1 && waited > 4096);
      check("J: the incomplete event was dropped", n_lost == 1);
    end
    heavy_fe0_n = -1;
    triggers(3, 300, 1200);
    drain();
    check("J: module warning after the recovery", n_autosync == 2);

    // mechanism coverage
    $display("events %0d, triggers %0d, patterns %0d, suppressed %0d, overflows %0d, FE warnings %0d",
             n_events, n_trig, n_burst, n_suppressed, n_overflow, n_fewarn);
    $display("masked %0d, ToT %0d, ROD SYNC %0d, error flags %0d, auto SYNC %0d, lost events %0d",
             n_masked, n_tot, n_rodsync_flag, n_err_flag, n_autosync, n_lost);
    $display("register reads %0d, FE writes %0d, FE reads %0d, transparent %0d",
             n_regread, n_fewrite, n_feread, n_transparent);
    check("mechanism: events", n_events > 0);
    check("mechanism: trigger pattern", n_burst > 0);
    check("mechanism: trigger suppression", n_suppressed > 0);
    check("mechanism: FIFO overflow warning", n_overflow > 0);
    check("mechanism: FE warning", n_fewarn > 0);
    check("mechanism: masked inputs", n_masked > 0);
    check("mechanism: ToT format", n_tot > 0);
    check("mechanism: ROD SYNC", n_rodsync_flag > 0);
    check("mechanism: error flag", n_err_flag > 0);
    check("mechanism: automatic SYNC", n_autosync > 0);
    check("mechanism: event lost and recovered", n_lost > 0);
    check("mechanism: register read-back", n_regread > 0);
    check("mechanism: FE write", n_fewrite > 0);
    check("mechanism: FE read-back", n_feread > 0);
    check("mechanism: transparent mode", n_transparent > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
