// tb_congestion_analyzer: all 512 MSB patterns of a 3x3 block; checks the
// ones count and the smooth/congested class against the reference rule.
module tb_congestion_analyzer;
  import wm_pkg::*;
  import wm_ref_pkg::*;
  logic [8:0] msbs;
  logic [3:0] count;
  blk_type_e  blk_type;
  int checks = 0, failures = 0, n_t1 = 0, n_t2 = 0;

  congestion_analyzer dut (.msbs, .count, .blk_type);

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
      bit exp_t2;
      msbs = 9'(v);
      #1;
      ones = $countones(msbs);
      exp_t2 = ref_is_t2(ones);
      if (exp_t2) n_t2++; else n_t1++;
      checks += 2;
      if (int'(count) != ones) begin
        failures++;
        $display("FAIL msbs=%b count=%0d", msbs, count);
      end
      if ((blk_type == BLK_T2) != exp_t2) begin
        failures++;
        $display("FAIL msbs=%b type=%0d", msbs, blk_type);
      end
    end
    // C(9,4)+C(9,5)+C(9,6) = 126+126+84 congested patterns
    checks++;
    if (n_t2 != 336 || n_t1 != 176) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
