// tb_t2_comparator: checks the congested-block decision for every count a
// 3x3 block can produce (0..9): congested exactly for 4, 5 and 6.
module tb_t2_comparator;
  import wm_ref_pkg::*;
  logic [3:0] count;
  logic       is_t2;
  int checks = 0, failures = 0;

  t2_comparator dut (.count, .is_t2);

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c <= 9; c++) begin
      count = 4'(c);
      #1;
      checks++;
      if (is_t2 != ref_is_t2(c)) begin
        failures++;
        $display("FAIL count=%0d is_t2=%b", c, is_t2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
