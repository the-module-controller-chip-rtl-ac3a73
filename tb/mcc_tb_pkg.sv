// mcc_tb_pkg: testbench helpers for the MCC.
//
// - mcc_event: one module event as a reference (trigger number, per-FE hits and
//   flags) and its expected serial form on DTO, written from the format rules and
//   not from the RTL.
// - gen_*: deterministic hit content of FE chip fe for its n-th trigger, so the FE
//   models and the checkers agree without sharing state.
// - cmd_*: bit strings of the ROD commands understood by the command decoder.
package mcc_tb_pkg;
  import mcc_pkg::*;

  typedef bit bitq_t[$];

  class mcc_event;
    bit [7:0]   num;
    bit [3:0]   modflags;
    fifo_word_t hits [N_FE][$];
    bit [3:0]   flags [N_FE];

    function new(bit [7:0] n = 0);
      num = n;
      modflags = 0;
      foreach (flags[f]) flags[f] = 0;
    endfunction

    // Expected DTO bits, first bit (header) first.
    function bitq_t to_bits(bit tot, bit [N_FE-1:0] mask);
      bitq_t q;
      q.push_back(1);
      for (int i = 7; i >= 0; i--) q.push_back(num[i]);
      if (modflags != 0) push_field(q, {4'hF, modflags});
      for (int f = 0; f < N_FE; f++) begin
        if (mask[f]) continue;
        if (hits[f].size() == 0 && flags[f] == 0) continue;
        push_field(q, {4'hE, 4'(f)});
        foreach (hits[f][k]) begin
          q.push_back(1);
          for (int i = 7; i >= 0; i--) q.push_back(hits[f][k].row[i]);
          for (int i = 4; i >= 0; i--) q.push_back(hits[f][k].col[i]);
          if (tot) for (int i = 7; i >= 0; i--) q.push_back(hits[f][k].tot[i]);
        end
        if (flags[f] != 0) push_field(q, {4'hF, flags[f]});
      end
      q.push_back(1);
      repeat (tot ? 22 : 14) q.push_back(0);
      return q;
    endfunction

    static function void push_field(ref bitq_t q, input bit [7:0] v);
      q.push_back(1);
      for (int i = 7; i >= 0; i--) q.push_back(v[i]);
    endfunction

    function string sprint();
      string s;
      s = $sformatf("ev %0d mf=%h", num, modflags);
      for (int f = 0; f < N_FE; f++)
        if (hits[f].size() != 0 || flags[f] != 0)
          s = {s, $sformatf(" fe%0d:%0dh/f%h", f, hits[f].size(), flags[f])};
      return s;
    endfunction
  endclass

  // ---- deterministic hit content -------------------------------------------------
  function automatic int unsigned mix(int unsigned a, int unsigned b, int unsigned c);
    int unsigned h;
    h = a * 32'h9E3779B1 ^ (b + 32'h7F4A7C15) * 32'h85EBCA77 ^ (c + 3) * 32'hC2B2AE3D;
    h ^= h >> 15;
    h *= 32'h2C1B3C6D;
    h ^= h >> 12;
    return h;
  endfunction

  // number of hits of FE fe for trigger n; "heavy" triggers (FE 3, n = 7, 18, 29)
  // send more hits than a FIFO holds, to provoke an overflow. A testbench can make
  // FE 0 overflow too in trigger heavy_fe0_n, which keeps the event builder busy
  // on FIFO 0 for a long time.
  int heavy_fe0_n = -1;

  function automatic bit heavy(int fe, int n);
    return (fe == 3 && n % 11 == 7 && n < 30) || (fe == 0 && n == heavy_fe0_n);
  endfunction

  function automatic int gen_nhits(int fe, int n, int maxh);
    if (heavy(fe, n)) return 40;
    return int'(mix(fe, n, 0) % (maxh + 1));
  endfunction

  function automatic fifo_word_t gen_hit(int fe, int n, int k);
    fifo_word_t w;
    int unsigned h = mix(fe, n, k + 1);
    w.lv1 = 4'(n);
    w.row = 8'(h % 160);
    w.col = 5'((h >> 8) % 18);
    w.tot = 8'(h >> 16);
    return w;
  endfunction

  // FE warning bit in the end-of-event word of FE fe for trigger n
  function automatic bit fe_warn(int fe, int n);
    return mix(fe, n, 99) % 17 == 0;
  endfunction

  // ---- ROD commands -----------------------------------------------------------------
  function automatic bitq_t cmd_lv1();
    bitq_t q = '{1, 1, 1, 0, 1};
    return q;
  endfunction

  function automatic bitq_t cmd_slow(bit [3:0] code);
    bitq_t q = '{1, 0, 1, 1, 0};
    for (int i = 3; i >= 0; i--) q.push_back(code[i]);
    return q;
  endfunction

  function automatic bitq_t cmd_wrreg(bit [3:0] a, bit [15:0] d);
    bitq_t q = cmd_slow(4'd3);
    for (int i = 3; i >= 0; i--) q.push_back(a[i]);
    for (int i = 15; i >= 0; i--) q.push_back(d[i]);
    return q;
  endfunction

  function automatic bitq_t cmd_rdreg(bit [3:0] a);
    bitq_t q = cmd_slow(4'd4);
    for (int i = 3; i >= 0; i--) q.push_back(a[i]);
    return q;
  endfunction

  // FE write/read: command header followed by the FE bits, each held 8 clocks
  function automatic bitq_t cmd_fe(bit rd, bitq_t fe_bits);
    bitq_t q = cmd_slow(rd ? 4'd6 : 4'd5);
    foreach (fe_bits[i]) repeat (8) q.push_back(fe_bits[i]);
    return q;
  endfunction

endpackage
