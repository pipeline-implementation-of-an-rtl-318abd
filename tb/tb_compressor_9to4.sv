// tb_compressor_9to4: applies all 512 input patterns to the 9-to-4
// compressor and compares the count with a population count.
module tb_compressor_9to4;
  logic [8:0] bits;
  logic [3:0] count;
  int checks = 0, failures = 0;

  compressor_9to4 dut (.bits, .count);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      int ones;
      bits = 9'(v);
      #1;
      ones = 0;
      for (int b = 0; b < 9; b++) ones += (v >> b) & 1;
      checks++;
      if (int'(count) != ones) begin
        failures++;
        $display("FAIL bits=%b count=%0d expected %0d", bits, count, ones);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
