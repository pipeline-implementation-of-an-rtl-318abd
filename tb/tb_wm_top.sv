// tb_wm_top: end-to-end tests of the watermark embedder. Four
// configurations run side by side: an 8x8 image (leftover lines and columns)
// in adaptive mode, a 9x9 image in enhanced mode, a 512x512 image in enhanced
// mode and a 256x256 image (the size of some standard test images) in
// adaptive mode. Each counts the mechanisms it exercised; any mechanism
// that never occurred is a failure.
module tb_wm_top;
  int checks = 0, failures = 0;
  logic f [4];
  int c [4], e [4], t1 [4], t2 [4], w0 [4], w1 [4], ch [4], ps [4];

  wm_top_run #(.N(8),   .ENH(1'b0), .NIMG(6)) r0 (.finished(f[0]), .checks(c[0]), .failures(e[0]),
    .n_t1(t1[0]), .n_t2(t2[0]), .n_w0(w0[0]), .n_w1(w1[0]), .n_changed(ch[0]), .n_pass_px(ps[0]));
  wm_top_run #(.N(9),   .ENH(1'b1), .NIMG(6)) r1 (.finished(f[1]), .checks(c[1]), .failures(e[1]),
    .n_t1(t1[1]), .n_t2(t2[1]), .n_w0(w0[1]), .n_w1(w1[1]), .n_changed(ch[1]), .n_pass_px(ps[1]));
  wm_top_run #(.N(512), .ENH(1'b1), .NIMG(1)) r2 (.finished(f[2]), .checks(c[2]), .failures(e[2]),
    .n_t1(t1[2]), .n_t2(t2[2]), .n_w0(w0[2]), .n_w1(w1[2]), .n_changed(ch[2]), .n_pass_px(ps[2]));
  wm_top_run #(.N(256), .ENH(1'b0), .NIMG(1)) r3 (.finished(f[3]), .checks(c[3]), .failures(e[3]),
    .n_t1(t1[3]), .n_t2(t2[3]), .n_w0(w0[3]), .n_w1(w1[3]), .n_changed(ch[3]), .n_pass_px(ps[3]));

  initial begin
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic need(int count, string what);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    wait (f[0] && f[1] && f[2] && f[3]);
    for (int i = 0; i < 4; i++) begin
      checks += c[i];
      failures += e[i];
      $display("config %0d: smooth %0d congested %0d wm0 %0d wm1 %0d changed px %0d passthrough px %0d",
               i, t1[i], t2[i], w0[i], w1[i], ch[i], ps[i]);
    end
    need(t1[0] + t1[1] + t1[2] + t1[3], "smooth block (T1, plane 3)");
    need(t2[0] + t2[1] + t2[2] + t2[3], "congested block (T2, plane 5)");
    need(w0[0] + w0[1] + w0[2], "watermark bit 0");
    need(w1[0] + w1[1] + w1[2], "watermark bit 1");
    need(ch[0] + ch[3], "adaptive embedding changed a pixel");
    need(ch[1] + ch[2], "enhanced embedding changed a pixel");
    need(ps[0] + ps[2] + ps[3], "leftover line/column copied through");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
