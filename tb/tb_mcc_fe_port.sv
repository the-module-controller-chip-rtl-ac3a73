// tb_mcc_fe_port: self-checking test of the FE port and its transparent mode.
//
// Normal mode: random values on the core-side outputs and the FE data lines must
// appear on the other side exactly one clock later. Transparent mode: the FE
// control lines must follow LV1T/SYNCT/DCI/LDT/CCKT at once, DTO must follow the
// data line of the selected FE at once, and the core must see idle data lines.
module tb_mcc_fe_port;
  import mcc_pkg::*;

  logic clk = 0, rst_n = 0, tm = 0;
  logic [3:0] fe_sel = 0;
  logic [15:0] dti = 0, core_dti;
  logic fe_lv1, fe_sync, fe_dao, fe_ld, fe_cck, dto, core_sel_dti;
  logic lv1t = 0, synct = 0, dci = 0, ldt = 0, cckt = 0;
  logic core_lv1 = 0, core_sync = 0, core_dao = 0, core_ld = 0, core_cck = 0, core_dto = 0;
  int checks = 0, failures = 0;

  mcc_fe_port dut (.*);

  always #5 clk = ~clk;

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

  initial begin
    bit [5:0] o;
    bit [15:0] d;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      o = 6'($urandom);
      d = 16'($urandom);
      fe_sel = 4'($urandom);
      {core_lv1, core_sync, core_dao, core_ld, core_cck, core_dto} = o;
      dti = d;
      {lv1t, synct, dci, ldt, cckt} = 5'($urandom);
      @(posedge clk);
      #1;
      check("outputs one clock later", {fe_lv1, fe_sync, fe_dao, fe_ld, fe_cck, dto} == o);
      check("inputs one clock later", core_dti == d && core_sel_dti == d[fe_sel]);
    end
    @(negedge clk) tm = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      {lv1t, synct, dci, ldt, cckt} = 5'($urandom);
      dti = 16'($urandom);
      fe_sel = 4'($urandom);
      {core_lv1, core_sync, core_dao, core_ld, core_cck, core_dto} = 6'($urandom);
      #1;
      check("transparent outputs", {fe_lv1, fe_sync, fe_dao, fe_ld, fe_cck} == {lv1t, synct, dci, ldt, cckt});
      check("transparent DTO", dto == dti[fe_sel]);
      @(posedge clk);
      #1;
      check("core sees idle lines", core_dti == 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
