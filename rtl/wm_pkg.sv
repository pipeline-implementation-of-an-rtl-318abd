// wm_pkg: constants shared by the bit-plane congestion watermark embedder.
//
// Pixels are 8-bit grey values. Bit-planes are numbered 1 (LSB) to 8 (MSB)
// in prose; the constants below give the matching 0-based bit index.
// Congestion is judged on the MSB plane of non-overlapping 3x3 blocks.
// A smooth block (type T1) carries its watermark bit in plane 3, a congested
// block (type T2) in plane 5. The enhanced variant also writes the inverted
// watermark bit into the plane just below the main one (plane 2 or 4).
package wm_pkg;
  localparam int unsigned PIX_W    = 8;  // bits per pixel
  localparam int unsigned BLK      = 3;  // block edge (3x3 mask)
  localparam int unsigned MSB_IDX  = 7;  // plane 8, analysed for congestion
  localparam int unsigned T1_IDX   = 2;  // plane 3, smooth blocks
  localparam int unsigned T2_IDX   = 4;  // plane 5, congested blocks

  typedef logic [PIX_W-1:0] pixel_t;

  // Block classes from the MSB-plane ones count.
  typedef enum logic {
    BLK_T1 = 1'b0,  // count in {0,1,2,3,7,8,9}: smooth
    BLK_T2 = 1'b1   // count in {4,5,6}: congested
  } blk_type_e;
endpackage
