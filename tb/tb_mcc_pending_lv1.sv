// tb_mcc_pending_lv1: self-checking test of the trigger counter and pending-LV1 FIFO.
//
// Random pushes (triggers) and pops (events built) against a model: each push
// stores the current 8-bit trigger count, which then increments; the head is the
// oldest pending number; flush empties the FIFO and restarts the count at 0.
module tb_mcc_pending_lv1;
  logic clk = 0, rst_n = 0, flush = 0, push = 0, pop = 0;
  logic [7:0] head, lv1_count;
  logic empty, full;
  int checks = 0, failures = 0;
  bit [7:0] model[$];
  bit [7:0] cnt = 0;

  mcc_pending_lv1 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      checks++;
      if (empty != (model.size() == 0) || full != (model.size() == 16) || lv1_count != cnt ||
          (model.size() > 0 && head != model[0])) begin
        failures++;
        $display("%t head %0d cnt %0d empty %b full %b, model %p cnt %0d",
                 $time, head, lv1_count, empty, full, model, cnt);
      end
      push  = $urandom_range(0, 1) && model.size() < 16;
      pop   = $urandom_range(0, 1) && model.size() > 0;
      flush = $urandom_range(0, 799) == 0;
      @(posedge clk);
      #1;
      if (flush) begin
        model.delete();
        cnt = 0;
      end else begin
        if (pop) void'(model.pop_front());
        if (push) begin
          model.push_back(cnt);
          cnt++;
        end
      end
      push = 0; pop = 0; flush = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
