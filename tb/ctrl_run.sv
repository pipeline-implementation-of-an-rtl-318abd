// ctrl_run: one controller test for an N-line image, used by
// tb_wm_controller. Two runs back to back, a spurious start mid-run.
module ctrl_run #(
  parameter int N = 9
) (
  output logic finished,
  output int   checks,
  output int   failures
);
  localparam int AW = $clog2(N), WAW = (N / 3 > 1) ? $clog2(N / 3) : 1;
  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done, img_rd_en, line_valid, line_blk_start, wm_req, wm_rd_en;
  logic out_valid, out_wr_en;
  logic [AW-1:0]  img_rd_addr, out_wr_addr;
  logic [WAW-1:0] wm_rd_addr;
  logic [3:0] v_sr = '0, t_sr = '0;

  wm_controller #(.IMG_N(N)) dut (.*);

  always #5 clk = ~clk;

  // Pipeline timing model.
  always @(posedge clk) begin
    v_sr <= {v_sr[2:0], line_valid};
    t_sr <= {t_sr[2:0], line_valid & line_blk_start};
  end
  assign wm_req    = t_sr[1];
  assign out_valid = v_sr[3];

  int exp_rd, exp_line, exp_wm, exp_wr;

  always @(posedge clk) begin
    if (rst_n) begin
      if (img_rd_en) begin
        checks++;
        if (int'(img_rd_addr) != exp_rd) begin failures++; $display("FAIL N=%0d rd addr %0d exp %0d", N, img_rd_addr, exp_rd); end
        exp_rd <= exp_rd + 1;
      end
      if (line_valid) begin
        checks++;
        if (line_blk_start != ((exp_line % 3 == 0) && (exp_line + 2 < N))) begin
          failures++; $display("FAIL N=%0d tag line %0d", N, exp_line);
        end
        exp_line <= exp_line + 1;
      end
      if (wm_rd_en) begin
        checks++;
        if (int'(wm_rd_addr) != exp_wm) begin failures++; $display("FAIL N=%0d wm addr %0d", N, wm_rd_addr); end
        exp_wm <= exp_wm + 1;
      end
      if (out_wr_en) begin
        checks++;
        if (int'(out_wr_addr) != exp_wr) begin failures++; $display("FAIL N=%0d wr addr %0d", N, out_wr_addr); end
        exp_wr <= exp_wr + 1;
      end
    end
  end

  initial begin
    finished = 0; checks = 0; failures = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      int edges;
      edges = 0;
      exp_rd = 0; exp_line = 0; exp_wm = 0; exp_wr = 0;
      @(negedge clk) start = 1;
      do begin
        @(posedge clk);
        edges++;
        #1;
        start = (edges == 3);  // a start while busy must be ignored
        if (edges > 1 && edges <= N + 5) begin
          checks++;
          if (!busy) begin failures++; $display("FAIL N=%0d busy low at edge %0d", N, edges); end
        end
      end while (!done && edges < 4 * N + 20);
      checks += 5;
      if (edges != N + 6) begin failures++; $display("FAIL N=%0d run took %0d edges, exp %0d", N, edges, N + 6); end
      if (busy) begin failures++; $display("FAIL N=%0d busy after done", N); end
      if (exp_rd != N || exp_wr != N) begin failures++; $display("FAIL N=%0d %0d reads %0d writes", N, exp_rd, exp_wr); end
      if (exp_wm != N / 3) begin failures++; $display("FAIL N=%0d %0d watermark reads", N, exp_wm); end
      @(posedge clk) #1;
      if (done || busy) begin failures++; $display("FAIL N=%0d done/busy not cleared", N); end
      repeat (3) @(negedge clk);
    end
    finished = 1;
  end
endmodule
