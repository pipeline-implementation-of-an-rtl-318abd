// embedding_logic: writes one watermark bit into one pixel.
//
// Two 2-to-1 multiplexers, one on plane 3 and one on plane 5, each choose
// between the pixel's own bit and the watermark bit. The block type from the
// congestion analyzer drives the selects, straight for one multiplexer and
// inverted for the other, so a smooth block (T1) gets the watermark in
// plane 3 and a congested block (T2) in plane 5. All other planes pass
// through unchanged.
//
// ENHANCED = 1 selects the enhanced scheme: the inverted watermark bit is
// also written into the plane just below the main one (plane 2 for T1,
// plane 4 for T2). This spreads the pixel error more evenly around zero and
// lowers the mean-square error. ENHANCED = 0, the default, is the plain
// adaptive scheme with only the two multiplexers.
// Purely combinational.
module embedding_logic
  import wm_pkg::*;
#(
  parameter bit ENHANCED = 1'b0
) (
  input  pixel_t    pix_in,
  input  blk_type_e blk_type,
  input  logic      wm_bit,
  output pixel_t    pix_out
);
  logic sel_t2;
  assign sel_t2 = (blk_type == BLK_T2);

  always_comb begin
    pix_out = pix_in;
    // plane 3 multiplexer: watermark when smooth, own bit when congested
    pix_out[T1_IDX] = sel_t2 ? pix_in[T1_IDX] : wm_bit;
    // plane 5 multiplexer: select inverted, watermark when congested
    pix_out[T2_IDX] = (!sel_t2) ? pix_in[T2_IDX] : wm_bit;
    if (ENHANCED) begin
      if (sel_t2) pix_out[T2_IDX-1] = ~wm_bit;
      else        pix_out[T1_IDX-1] = ~wm_bit;
    end
  end
endmodule
