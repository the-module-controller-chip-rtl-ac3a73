// mcc_fe_model: behavioural model of one pixel front-end (FE) chip, for testbenches.
//
// Behavioural model only (not synthesizable): the FE chips are separate chips and
// not part of the MCC. Data side: every trigger seen on lv1 queues one event,
// numbered by a trigger count that SYNC resets; the events are pushed out on
// dout in order, each as its hits (content from mcc_tb_pkg::gen_hit, count from
// gen_nhits) and an end-of-event word, 18 bits per word (26 with ToT), with
// random idle gaps. Some end-of-event words carry the FE warning bit. Setting
// corrupt_n makes the end-of-event of that event carry a wrong trigger number.
// Configuration side: each rising CCK edge logs DAO and LD. For a read-back the
// testbench loads rb_bits and sets rb_start to the index (in cfg_bits) of the
// first rising edge after the command bits; bit j of rb_bits is then driven on
// dout from the falling CCK edge before rising edge rb_start + j.
module mcc_fe_model
  import mcc_pkg::*;
  import mcc_tb_pkg::*;
#(
  parameter int FE_ID = 0,
  parameter int MAXH  = 4
) (
  input  logic clk,
  input  logic lv1,
  input  logic sync,
  input  logic cck,
  input  logic dao,
  input  logic ld,
  input  logic tot_en,
  output logic dout
);

  int  n_trig = 0;
  int  queue[$];
  int  corrupt_n = -1;
  bit  cfg_bits[$], cfg_ld[$];
  bit  rb_bits[$];
  bit  cck_q = 0;
  bit  data_do = 0, rb_do = 0;
  int  rb_start = -1;
  int  epoch = 0;       // bumped by SYNC to abort a word being sent

  assign dout = data_do | rb_do;

  always @(posedge clk) begin
    if (sync) begin
      n_trig = 0;
      queue.delete();
      epoch++;
    end else if (lv1) begin
      queue.push_back(n_trig);
      n_trig++;
    end
    // configuration
    if (cck && !cck_q) begin
      cfg_bits.push_back(dao);
      cfg_ld.push_back(ld);
    end
    if (!cck && cck_q) begin
      automatic int j = cfg_bits.size() - rb_start;
      rb_do <= (rb_start >= 0 && j >= 0 && j < rb_bits.size()) ? rb_bits[j] : 1'b0;
    end
    cck_q = cck;
  end

  task automatic send_word(bit [24:0] w, int my_epoch, output bit aborted);
    automatic bit [25:0] b = tot_en ? {1'b1, w} : {8'b0, 1'b1, w[24:8]};
    automatic int nb = tot_en ? 26 : 18;
    aborted = 0;
    for (int i = nb - 1; i >= 0; i--) begin
      @(posedge clk);
      if (epoch != my_epoch) begin
        data_do <= 0;
        aborted = 1;
        return;
      end
      data_do <= b[i];
    end
    @(posedge clk);
    data_do <= 0;
    repeat ($urandom_range(0, 3)) @(posedge clk);
  endtask

  initial begin
    forever begin
      @(posedge clk);
      if (queue.size() != 0) begin
        automatic int n = queue.pop_front();
        automatic int my_epoch = epoch;
        automatic int nh = gen_nhits(FE_ID, n, MAXH);
        automatic bit aborted = 0;
        automatic fifo_word_t e = '0;
        for (int k = 0; k < nh && !aborted; k++) send_word(gen_hit(FE_ID, n, k), my_epoch, aborted);
        if (aborted) continue;
        e.lv1 = (n == corrupt_n) ? 4'(n + 1) : 4'(n);
        e.row = {4'hF, 3'b000, fe_warn(FE_ID, n)};
        send_word(e, my_epoch, aborted);
      end
    end
  end

endmodule
