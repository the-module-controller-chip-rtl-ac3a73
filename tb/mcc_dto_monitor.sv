// mcc_dto_monitor: testbench monitor that parses the MCC's serial event stream.
//
// It samples din on every rising clock edge. An event starts with a 1 on the idle
// line; the parser then reads the 8-bit LV1#, and field after field: a sync bit 1,
// then 8 bits that are an FE# ({4'hE, fe}), a flag field ({4'hF, flags}) or the row
// of a hit, followed by the column and, with ToT, the ToT. A 0 where a sync bit
// should follow an all-zero hit closes the event (the trailer). Parsed events are
// appended to `events`; `raw` keeps each event's bits for exact comparison.
// Malformed streams count in `errors`.
module mcc_dto_monitor
  import mcc_pkg::*;
  import mcc_tb_pkg::*;
(
  input logic clk,
  input logic tot_en,
  input logic din
);

  mcc_event events[$];
  bitq_t    raw[$];
  int       errors = 0;

  bitq_t cur_raw;

  task automatic get_bit(output bit b);
    @(posedge clk);
    b = din;
    cur_raw.push_back(b);
  endtask

  task automatic get_bits(int n, output bit [31:0] v);
    bit b;
    v = 0;
    repeat (n) begin
      get_bit(b);
      v = {v[30:0], b};
    end
  endtask

  initial begin
    forever begin
      mcc_event ev;
      bit b, have_sync, done;
      bit [31:0] v, c, t;
      int cur_fe;
      @(posedge clk);
      if (din !== 1'b1) continue;
      cur_raw = {};
      cur_raw.push_back(1);
      ev = new();
      get_bits(8, v);
      ev.num = v[7:0];
      cur_fe = -1;
      have_sync = 0;
      done = 0;
      while (!done) begin
        if (!have_sync) begin
          get_bit(b);
          if (b != 1) begin
            errors++;
            $display("monitor: missing sync bit in event %0d", ev.num);
            break;
          end
        end
        have_sync = 0;
        get_bits(8, v);
        if (v[7:4] == 4'hE) begin
          cur_fe = int'(v[3:0]);
        end else if (v[7:4] == 4'hF) begin
          if (cur_fe < 0) ev.modflags = v[3:0];
          else            ev.flags[cur_fe] = v[3:0];
        end else begin
          fifo_word_t w;
          get_bits(5, c);
          t = 0;
          if (tot_en) get_bits(8, t);
          w.lv1 = ev.num[3:0];
          w.row = v[7:0];
          w.col = c[4:0];
          w.tot = t[7:0];
          if (v[7:0] == 0 && c == 0 && t == 0) begin
            get_bit(b);
            if (b == 0) begin
              done = 1;
              continue;
            end
            have_sync = 1;
          end
          if (cur_fe < 0) begin
            errors++;
            $display("monitor: hit before any FE# in event %0d", ev.num);
          end else begin
            ev.hits[cur_fe].push_back(w);
          end
        end
      end
      if (done) begin
        events.push_back(ev);
        raw.push_back(cur_raw);
      end
    end
  end

endmodule
