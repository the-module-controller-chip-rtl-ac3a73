// tb_mcc_command_decoder: self-checking test of the serial command decoder.
//
// Sends every command of the protocol on DCI, with idle gaps, and checks: one
// lv1_cmd per trigger command; sync_cmd; RUN sets data taking and slow commands
// clear it; register writes and reads with their address and data; an FE write
// whose bits appear on DAO at the rising CCK edges, with LD high for the first
// CMDLEN bits, CCK at one eighth of the clock rate; an FE read whose returned bits
// come back on cfg_dto after a start bit, 8 clocks per bit.
module tb_mcc_command_decoder;
  import mcc_pkg::*;
  import mcc_tb_pkg::*;

  logic clk = 0, rst_n = 0, dci = 0, fe_din = 0;
  logic [15:0] cmd_len = 5, data_len = 7, reg_wdata;
  logic lv1_cmd, sync_cmd, run, reg_we, reg_rd, dao, ld, cck, cfg_dto, fe_busy;
  logic [3:0] reg_addr;
  int checks = 0, failures = 0;
  int n_lv1 = 0, n_sync = 0, n_we = 0, n_rd = 0;
  bit [3:0] last_addr;
  bit [15:0] last_data;
  // FE side
  bit cck_q = 0;
  int n_rise = 0;
  bit dao_bits[$], ld_bits[$];
  time rise_times[$];
  bit rb[$];

  mcc_command_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  always @(posedge clk) if (rst_n) begin
    if (lv1_cmd) n_lv1++;
    if (sync_cmd) n_sync++;
    if (reg_we) begin n_we++; last_addr = reg_addr; last_data = reg_wdata; end
    if (reg_rd) begin n_rd++; last_addr = reg_addr; end
    // FE chip model: capture on rising CCK, present read-back data after falling CCK
    if (cck && !cck_q) begin
      n_rise++;
      dao_bits.push_back(dao);
      ld_bits.push_back(ld);
      rise_times.push_back($time);
    end
    if (!cck && cck_q) begin
      automatic int j = n_rise - int'(cmd_len);
      automatic int nrb = rb.size();
      if (j >= 0 && j < nrb) fe_din <= rb[j];
    end
    cck_q = cck;
  end

  task automatic send(bitq_t q);
    foreach (q[i]) begin
      @(posedge clk);
      dci <= q[i];
    end
    @(posedge clk);
    dci <= 0;
    repeat ($urandom_range(1, 4)) @(posedge clk);
  endtask

  initial begin
    bitq_t fe;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    // triggers
    for (int k = 0; k < 10; k++) send(cmd_lv1());
    repeat (3) @(posedge clk);
    check("10 triggers", n_lv1 == 10);
    send(cmd_slow(4'(SC_SYNC)));
    repeat (3) @(posedge clk);
    check("SYNC", n_sync == 1 && n_lv1 == 10);
    check("not running after reset", !run);
    send(cmd_slow(4'(SC_RUN)));
    repeat (2) @(posedge clk);
    check("RUN", run);
    // register write and read
    for (int k = 0; k < 8; k++) begin
      automatic bit [3:0] a = 4'($urandom);
      automatic bit [15:0] d = 16'($urandom);
      send(cmd_wrreg(a, d));
      repeat (2) @(posedge clk);
      check("register write", n_we == k + 1 && last_addr == a && last_data == d && !run);
      send(cmd_rdreg(~a));
      repeat (2) @(posedge clk);
      check("register read", n_rd == k + 1 && last_addr == ~a);
    end
    check("no stray triggers", n_lv1 == 10 && n_sync == 1);
    // FE write: 5 control + 7 data bits
    fe = {};
    for (int i = 0; i < 12; i++) fe.push_back(1'($urandom));
    dao_bits.delete(); ld_bits.delete(); rise_times.delete(); n_rise = 0;
    send(cmd_fe(0, fe));
    wait (!fe_busy);
    repeat (10) @(posedge clk);
    check("12 CCK edges", n_rise == 12);
    check("DAO bits", dao_bits == fe);
    for (int i = 0; i < 12; i++) check("LD", ld_bits[i] == (i < 5));
    check("CCK period 8 clocks", rise_times.size() == 12 && rise_times[11] - rise_times[0] == 11 * 80);
    // FE read: 4 control bits out, 6 bits back
    cmd_len = 4;
    data_len = 6;
    rb = {};
    for (int i = 0; i < 6; i++) rb.push_back(1'($urandom));
    fe = {};
    for (int i = 0; i < 4; i++) fe.push_back(1'($urandom));
    dao_bits.delete(); ld_bits.delete(); n_rise = 0;
    fork
      send(cmd_fe(1, fe));
      begin
        bit got[$];
        do @(posedge clk); while (cfg_dto !== 1'b1);
        repeat (8) @(posedge clk);
        repeat (6) begin
          repeat (4) @(posedge clk);
          got.push_back(cfg_dto);
          repeat (4) @(posedge clk);
        end
        check("read-back bits", got == rb);
      end
    join
    wait (!fe_busy);
    repeat (10) @(posedge clk);
    check("read: 10 CCK edges", n_rise == 10);
    check("read: command bits", dao_bits[0:3] == fe);
    // triggers still decoded afterwards
    send(cmd_lv1());
    repeat (3) @(posedge clk);
    check("trigger after FE access", n_lv1 == 11);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
