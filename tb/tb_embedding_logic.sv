// tb_embedding_logic: every pixel value, block class and watermark bit,
// through both the plain adaptive (ENHANCED=0) and the enhanced
// (ENHANCED=1) embedder. Also checks the mean-square error over the four
// states of the two affected planes: enhanced must be lower than adaptive.
module tb_embedding_logic;
  import wm_pkg::*;
  import wm_ref_pkg::*;
  pixel_t    pix_in, out_a, out_e;
  blk_type_e blk_type;
  logic      wm_bit;
  int checks = 0, failures = 0;
  int se_a, se_e;

  embedding_logic #(.ENHANCED(1'b0)) dut_a (.pix_in, .blk_type, .wm_bit, .pix_out(out_a));
  embedding_logic #(.ENHANCED(1'b1)) dut_e (.pix_in, .blk_type, .wm_bit, .pix_out(out_e));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    se_a = 0; se_e = 0;
    for (int p = 0; p < 256; p++)
      for (int t = 0; t < 2; t++)
        for (int w = 0; w < 2; w++) begin
          logic [7:0] ea, ee;
          pix_in   = pixel_t'(p);
          blk_type = t ? BLK_T2 : BLK_T1;
          wm_bit   = w[0];
          #1;
          ea = ref_embed(8'(p), t[0], w[0], 1'b0);
          ee = ref_embed(8'(p), t[0], w[0], 1'b1);
          checks += 2;
          if (out_a != ea) begin
            failures++;
            $display("FAIL adaptive p=%0d t2=%0d w=%0d got %0d exp %0d", p, t, w, out_a, ea);
          end
          if (out_e != ee) begin
            failures++;
            $display("FAIL enhanced p=%0d t2=%0d w=%0d got %0d exp %0d", p, t, w, out_e, ee);
          end
          se_a += (int'(out_a) - p) * (int'(out_a) - p);
          se_e += (int'(out_e) - p) * (int'(out_e) - p);
        end
    #1;
    checks++;
    if (se_a - se_e <= 0) begin
      failures++;
      $display("FAIL enhanced squared error %0d not below adaptive %0d", se_e, se_a);
    end
    $display("squared error: adaptive %0d enhanced %0d", se_a, se_e);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
