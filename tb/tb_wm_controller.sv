// tb_wm_controller: runs the controller against a timing model of the line
// pipeline (watermark request two clocks and output four clocks after a
// line's data) for a 9-line and an 8-line image. Checks the read address
// sequence, the block-row tags, the watermark and output address counters,
// that a run takes N+6 clock edges from the edge sampling start to the one
// writing the last line, and that start is ignored while busy.
module tb_wm_controller;
  int checks = 0, failures = 0;
  logic done9, done8;
  int   c9, f9, c8, f8;

  ctrl_run #(.N(9)) u9 (.finished(done9), .checks(c9), .failures(f9));
  ctrl_run #(.N(8)) u8 (.finished(done8), .checks(c8), .failures(f8));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (done9 && done8);
    checks = c9 + c8;
    failures = f9 + f8;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
