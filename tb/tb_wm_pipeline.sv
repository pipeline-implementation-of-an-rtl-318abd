// tb_wm_pipeline: streams random 8x8 images (two whole block rows and block
// columns plus two leftover lines and columns) through the line pipeline,
// once in plain adaptive and once in enhanced mode, answering watermark
// requests like a synchronous RAM. Every output line is compared with the
// reference embedding, and each line must leave exactly three clocks after
// it entered. Counts smooth and congested blocks to make sure both occur.
module tb_wm_pipeline;
  import wm_pkg::*;
  import wm_ref_pkg::*;
  localparam int W = 8, NL = 8, BC = W / 3, NIMG = 6, LW = W * 8;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_blk_start = 0;
  logic [LW-1:0] in_line = '0;
  logic wm_req_a, wm_req_e;
  logic [BC-1:0] wm_bits = '0;
  logic out_valid_a, out_valid_e;
  logic [LW-1:0] out_line_a, out_line_e;

  wm_pipeline #(.IMG_W(W), .ENHANCED(1'b0)) dut_a (
    .clk, .rst_n, .in_valid, .in_blk_start, .in_line, .wm_req(wm_req_a), .wm_bits,
    .out_valid(out_valid_a), .out_line(out_line_a));
  wm_pipeline #(.IMG_W(W), .ENHANCED(1'b1)) dut_e (
    .clk, .rst_n, .in_valid, .in_blk_start, .in_line, .wm_req(wm_req_e), .wm_bits,
    .out_valid(out_valid_e), .out_line(out_line_e));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_t1 = 0, n_t2 = 0, n_pass_lines = 0;
  logic [7:0]    img  [NL][W];
  logic [BC-1:0] wm   [NL/3];
  logic [7:0]    exp_a [NL][W];
  logic [7:0]    exp_e [NL][W];
  int cyc = 0, in_cyc [NL], wm_k = 0, out_l = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc <= cyc + 1;

  // Watermark RAM model: one word per block row, one clock read latency.
  always @(posedge clk) begin
    if (wm_req_a) begin
      wm_bits <= wm[wm_k];
      wm_k    <= wm_k + 1;
    end
  end

  task automatic build_reference();
    for (int l = 0; l < NL; l++)
      for (int x = 0; x < W; x++) begin
        exp_a[l][x] = img[l][x];
        exp_e[l][x] = img[l][x];
      end
    for (int k = 0; k < NL / 3; k++)
      for (int c = 0; c < BC; c++) begin
        int ones = 0;
        bit t2;
        for (int r = 0; r < 3; r++)
          for (int p = 0; p < 3; p++) ones += img[3*k+r][3*c+p][7];
        t2 = ref_is_t2(ones);
        if (t2) n_t2++; else n_t1++;
        for (int r = 0; r < 3; r++)
          for (int p = 0; p < 3; p++) begin
            exp_a[3*k+r][3*c+p] = ref_embed(img[3*k+r][3*c+p], t2, wm[k][c], 1'b0);
            exp_e[3*k+r][3*c+p] = ref_embed(img[3*k+r][3*c+p], t2, wm[k][c], 1'b1);
          end
      end
  endtask

  // Output checker.
  always @(posedge clk) begin
    if (rst_n && out_valid_a) begin
      checks += 4;
      if (!out_valid_e) failures++;
      if (cyc - in_cyc[out_l] != 3) begin
        failures++;
        $display("FAIL line %0d latency %0d", out_l, cyc - in_cyc[out_l]);
      end
      for (int x = 0; x < W; x++) begin
        if (out_line_a[8*x +: 8] != exp_a[out_l][x]) begin
          failures++;
          $display("FAIL adaptive line %0d pixel %0d got %h exp %h", out_l, x, out_line_a[8*x +: 8], exp_a[out_l][x]);
        end
        if (out_line_e[8*x +: 8] != exp_e[out_l][x]) begin
          failures++;
          $display("FAIL enhanced line %0d pixel %0d got %h exp %h", out_l, x, out_line_e[8*x +: 8], exp_e[out_l][x]);
        end
      end
      if (out_l >= 3 * (NL / 3)) n_pass_lines++;
      out_l <= out_l + 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NIMG; n++) begin
      for (int l = 0; l < NL; l++)
        for (int x = 0; x < W; x++) img[l][x] = 8'($urandom);
      for (int k = 0; k < NL / 3; k++) wm[k] = BC'($urandom);
      build_reference();
      wm_k = 0;
      out_l = 0;
      for (int l = 0; l < NL; l++) begin
        @(negedge clk);
        in_valid = 1;
        in_blk_start = (l % 3 == 0) && (l + 2 < NL);
        for (int x = 0; x < W; x++) in_line[8*x +: 8] = img[l][x];
        in_cyc[l] = cyc + 1;
      end
      @(negedge clk);
      in_valid = 0;
      in_blk_start = 0;
      repeat (8) @(negedge clk);
      checks++;
      if (out_l != NL) begin
        failures++;
        $display("FAIL image %0d: %0d lines out", n, out_l);
      end
    end
    checks += 2;
    if (n_t1 == 0) begin failures++; $display("FAIL no smooth block"); end
    if (n_t2 == 0) begin failures++; $display("FAIL no congested block"); end
    $display("smooth blocks %0d congested blocks %0d leftover lines %0d", n_t1, n_t2, n_pass_lines);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
