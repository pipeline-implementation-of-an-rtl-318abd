// tb_wm_top_full: one complete run of the embedder at its default size
// (512x512 image, plain adaptive mode). Loads a random image and watermark,
// runs, checks the N+6 clock run time, reads the result back and compares
// every pixel with the reference embedding.
module tb_wm_top_full;
  localparam int N = 512;
  localparam bit ENH = 1'b0;
  localparam int NIMG = 1;
  import wm_ref_pkg::*;
  localparam int BN = N / 3, LW = N * 8;
  localparam int AW = $clog2(N), WAW = (BN > 1) ? $clog2(BN) : 1;

  logic clk = 0, rst_n = 0;
  logic img_wr_en = 0, wm_wr_en = 0, start = 0, out_rd_en = 0;
  logic [AW-1:0]  img_wr_addr = '0, out_rd_addr = '0;
  logic [LW-1:0]  img_wr_data = '0, out_rd_data;
  logic [WAW-1:0] wm_wr_addr = '0;
  logic [BN-1:0]  wm_wr_data = '0;
  logic busy, done;

  wm_top dut (.*);

  always #5 clk = ~clk;

  logic [7:0]    img [N][N];
  logic [7:0]    expd [N][N];
  logic [BN-1:0] wm [BN];

  int checks, failures, n_t1, n_t2, n_w0, n_w1, n_changed, n_pass_px;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks = 0; failures = 0;
    n_t1 = 0; n_t2 = 0; n_w0 = 0; n_w1 = 0; n_changed = 0; n_pass_px = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < NIMG; n++) begin
      int edges;
      // random image and message
      for (int y = 0; y < N; y++)
        for (int x = 0; x < N; x++) img[y][x] = 8'($urandom);
      for (int k = 0; k < BN; k++) wm[k] = BN'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      // reference
      for (int y = 0; y < N; y++)
        for (int x = 0; x < N; x++) expd[y][x] = img[y][x];
      for (int k = 0; k < BN; k++)
        for (int c = 0; c < BN; c++) begin
          int ones;
          bit t2;
          ones = 0;
          for (int r = 0; r < 3; r++)
            for (int p = 0; p < 3; p++) ones += img[3*k+r][3*c+p][7];
          t2 = ref_is_t2(ones);
          if (t2) n_t2++; else n_t1++;
          if (wm[k][c]) n_w1++; else n_w0++;
          for (int r = 0; r < 3; r++)
            for (int p = 0; p < 3; p++)
              expd[3*k+r][3*c+p] = ref_embed(img[3*k+r][3*c+p], t2, wm[k][c], ENH);
        end
      // load RAMs
      for (int y = 0; y < N; y++) begin
        @(negedge clk);
        img_wr_en = 1; img_wr_addr = AW'(y);
        for (int x = 0; x < N; x++) img_wr_data[8*x +: 8] = img[y][x];
      end
      @(negedge clk) img_wr_en = 0;
      for (int k = 0; k < BN; k++) begin
        @(negedge clk);
        wm_wr_en = 1; wm_wr_addr = WAW'(k); wm_wr_data = wm[k];
      end
      @(negedge clk) wm_wr_en = 0;
      // run
      @(negedge clk) start = 1;
      edges = 0;
      do begin
        @(posedge clk);
        edges++;
        #1;
        start = (edges == 4);
      end while (!done && edges < 2 * N + 20);
      checks++;
      if (edges != N + 6) begin
        failures++;
        $display("FAIL N=%0d run took %0d clock edges, expected %0d", N, edges, N + 6);
      end
      @(negedge clk);
      checks++;
      if (busy) begin failures++; $display("FAIL N=%0d restarted by a start while busy", N); end
      // read back
      for (int y = 0; y < N; y++) begin
        out_rd_en = 1; out_rd_addr = AW'(y);
        @(negedge clk);
        for (int x = 0; x < N; x++) begin
          logic [7:0] got;
          got = out_rd_data[8*x +: 8];
          checks++;
          if (got != expd[y][x]) begin
            failures++;
            if (failures < 10)
              $display("FAIL N=%0d enh=%0d image %0d pixel (%0d,%0d) got %h exp %h in %h",
                       N, ENH, n, y, x, got, expd[y][x], img[y][x]);
          end
          if (got != img[y][x]) n_changed++;
          if (y >= 3 * BN || x >= 3 * BN) n_pass_px++;
        end
      end
      out_rd_en = 0;
    end
    $display("smooth %0d congested %0d wm0 %0d wm1 %0d changed px %0d passthrough px %0d",
             n_t1, n_t2, n_w0, n_w1, n_changed, n_pass_px);
    checks += 3;
    if (n_t1 == 0) begin failures++; $display("FAIL no smooth block"); end
    if (n_t2 == 0) begin failures++; $display("FAIL no congested block"); end
    if (n_pass_px == 0) begin failures++; $display("FAIL no leftover pixel"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
