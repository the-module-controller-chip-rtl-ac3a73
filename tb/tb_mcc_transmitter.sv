// tb_mcc_transmitter: self-checking test of the serial transmitter.
//
// Bursts of random fields (length 2..23) are offered as fast as the transmitter
// accepts them; the serial output must be the concatenation of the fields, MSB
// first, with no gap between fields of a burst and the first bit two clocks after
// the first handshake. Between bursts the line must idle at 0.
module tb_mcc_transmitter;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, dout, busy;
  logic [4:0] in_len = 0;
  logic [22:0] in_bits = 0;
  int checks = 0, failures = 0;
  bit exp[$];

  mcc_transmitter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int b = 0; b < 200; b++) begin
      automatic int nf = $urandom_range(1, 12);
      automatic bit got[$];
      automatic int lat = -1;
      exp.delete();
      fork
        begin
          for (int f = 0; f < nf; f++) begin
            automatic int len = $urandom_range(2, 23);
            automatic bit [22:0] v = 23'($urandom) & ((23'd1 << len) - 1);
            if (f == 0) v[len-1] = 1;       // a burst starts with a 1, like an event
            in_valid <= 1;
            in_len   <= 5'(len);
            in_bits  <= v;
            do @(posedge clk); while (!in_ready);
            for (int i = len - 1; i >= 0; i--) exp.push_back(v[i]);
          end
          in_valid <= 0;
        end
        begin
          // collect from the first 1 until the expected length is reached
          automatic int n = 0;
          do begin
            @(posedge clk);
            n++;
          end while (dout !== 1'b1 && n < 100);
          lat = n;
          got.push_back(1);
          while (got.size() < 300 && (exp.size() == 0 || got.size() < exp.size() || busy)) begin
            @(posedge clk);
            if (got.size() < exp.size() || busy) got.push_back(dout);
          end
        end
      join
      checks++;
      if (lat != 4) begin   // handshake edge, load edge, output register edge, sample
        failures++;
        $display("burst %0d: first bit after %0d clocks", b, lat);
      end
      checks++;
      if (got.size() < exp.size() || got[0:exp.size()-1] != exp) begin
        failures++;
        $display("burst %0d: stream mismatch %p / %p", b, got, exp);
      end
      repeat (3) @(posedge clk);
      checks++;
      if (dout !== 0 || busy) begin
        failures++;
        $display("line not idle after burst %0d", b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
