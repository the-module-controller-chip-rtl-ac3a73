// tb_mcc_register_bank: self-checking test of the register bank and its read-back.
//
// Writes random values to all 16 addresses and reads every address back through
// the serial read-back (start bit 1, then 16 bits MSB first), with tx_allow held
// low for a while to check that read-back waits for the line. Checks: writable
// registers return what was written (n = 0 becomes 1), read-only and unbuilt
// addresses ignore writes, sticky status bits collect pulses and are cleared,
// status inputs are visible, and the decoded configuration outputs follow.
module tb_mcc_register_bank;
  import mcc_pkg::*;

  logic clk = 0, rst_n = 0, we = 0, rd_start = 0, tx_allow = 0, dout, rd_busy;
  logic [3:0] waddr = 0, rd_addr = 0;
  logic [15:0] wdata = 0;
  logic run = 0, clear_status = 0;
  logic [15:0] warn_set = 0, err_set = 0;
  logic [4:0] pending = 0;
  logic [7:0] lv1_count = 0;
  logic [15:0] suppressed = 0;
  logic tot_en, autosync_en;
  logic [3:0] max_pending, burst_m1, fe_sel;
  logic [15:0] fe_mask, cmd_len, data_len;
  int checks = 0, failures = 0;
  bit [15:0] model [16];

  mcc_register_bank dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  task automatic wr(bit [3:0] a, bit [15:0] d);
    @(posedge clk) begin we <= 1; waddr <= a; wdata <= d; end
    @(posedge clk) we <= 0;
  endtask

  task automatic rd(bit [3:0] a, output bit [15:0] v);
    int n = 0;
    @(posedge clk) begin rd_start <= 1; rd_addr <= a; tx_allow <= 0; end
    @(posedge clk) rd_start <= 0;
    repeat (10) begin
      @(posedge clk);
      if (dout) n++;
    end
    check("read-back waits for tx_allow", n == 0 && rd_busy);
    tx_allow <= 1;
    do @(posedge clk); while (dout !== 1'b1);
    for (int i = 15; i >= 0; i--) begin
      @(posedge clk);
      v[i] = dout;
    end
    @(posedge clk);
    check("read-back done", !rd_busy && dout == 0);
  endtask

  initial begin
    bit [15:0] v;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    check("reset n = 15, one trigger", max_pending == 15 && burst_m1 == 0 && fe_mask == 0);
    foreach (model[a]) model[a] = 0;
    model[R_LV1CFG] = 16'h000F;
    pending   <= 5'd9;
    lv1_count <= 8'hA5;
    suppressed <= 16'h1234;
    run <= 1;
    for (int r = 0; r < 3; r++) begin
      for (int a = 0; a < 16; a++) begin
        automatic bit [15:0] d = 16'($urandom);
        if (r == 1 && a == R_LV1CFG) d[3:0] = 0;
        wr(4'(a), d);
        case (a)
          R_CSR:     model[a] = {d[15:3], 1'b0, d[1:0]};
          R_LV1CFG:  model[a] = (d[3:0] == 0) ? {d[15:4], 4'd1} : d;
          R_FEMASK, R_CMDLEN, R_DATALEN, R_FESEL: model[a] = d;
          default: ;
        endcase
      end
      for (int a = 0; a < 16; a++) begin
        automatic bit [15:0] want = model[a];
        if (a == R_CSR) want[2] = 1;   // run status
        if (a == R_PENDING) want = 16'd9;
        if (a == R_LV1CNT) want = 16'hA5;
        if (a == R_SUPPR) want = 16'h1234;
        rd(4'(a), v);
        if (v != want) $display("reg %0d: %h want %h", a, v, want);
        check("register value", v == want);
      end
      check("decoded outputs", tot_en == model[R_CSR][0] && autosync_en == model[R_CSR][1] &&
            max_pending == model[R_LV1CFG][3:0] && burst_m1 == model[R_LV1CFG][7:4] &&
            fe_mask == model[R_FEMASK] && cmd_len == model[R_CMDLEN] &&
            data_len == model[R_DATALEN] && fe_sel == model[R_FESEL][3:0]);
    end
    // sticky status bits
    @(posedge clk) begin warn_set <= 16'h0011; err_set <= 16'h8000; end
    @(posedge clk) begin warn_set <= 16'h0100; err_set <= 0; end
    @(posedge clk) warn_set <= 0;
    rd(R_WARN, v);
    check("sticky warnings", v == 16'h0111);
    rd(R_ERR, v);
    check("sticky errors", v == 16'h8000);
    @(posedge clk) clear_status <= 1;
    @(posedge clk) clear_status <= 0;
    rd(R_WARN, v);
    check("warnings cleared", v == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
