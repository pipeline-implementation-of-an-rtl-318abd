// congestion_analyzer: classifies one 3x3 block as smooth (T1) or congested
// (T2) from the most significant bit-plane of its nine pixels.
//
// The nine MSBs are summed by a 9-to-4 compressor and the sum is tested by
// the T2 comparator: a block whose MSB plane holds 4, 5 or 6 ones (close to
// an even mix of ones and zeros) is congested. Purely combinational; the
// caller registers the result with the embedded pixels.
// msbs[3*r + c] is the MSB of the pixel in block row r, column c.
module congestion_analyzer
  import wm_pkg::*;
(
  input  logic [8:0]  msbs,
  output logic [3:0]  count,
  output blk_type_e   blk_type
);
  logic is_t2;

  compressor_9to4 u_cmp (.bits(msbs), .count(count));
  t2_comparator   u_t2  (.count(count), .is_t2(is_t2));

  assign blk_type = is_t2 ? BLK_T2 : BLK_T1;
endmodule
