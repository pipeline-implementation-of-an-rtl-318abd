// wm_pipeline: line-wide datapath of the watermark embedder.
//
// One whole image line (IMG_W pixels) enters per clock. Three line
// registers, row1 (newest) to row3 (oldest), form a shift register. When
// row3 holds the first line of a block row (lines 3k, 3k+1, 3k+2 sit in
// row3, row2, row1), every 3-pixel column of the three rows is a 3x3 block:
// one congestion analyzer per block column sums the nine MSBs and classifies
// the block, and one embedding logic per pixel writes that block's watermark
// bit. On that clock the three embedded lines move on in place of the raw
// ones: embedded row3 goes to the output register, embedded row2 and row1
// go to row3 and row2. Every other clock is a plain shift, so lines that
// belong to no complete block (the last IMG_W mod 3 lines) and pixels right
// of the last full block column leave unchanged.
//
// Interface and timing:
//   in_valid/in_blk_start/in_line : one line per clock, no gaps inside an
//       image; in_blk_start marks line 3k when line 3k+2 exists.
//   wm_req   : high one clock before a block row is embedded (its first line
//       is in row2); wm_bits must carry that block row's watermark bits on
//       the next clock, bit j for block column j (a synchronous RAM read
//       started by wm_req gives exactly this).
//   out_valid/out_line : a line sampled into row1 on edge e is in row2 on
//       e+1, row3 on e+2 and in the output register on e+3.
// Pixel j of a line is bits [8j+7 : 8j]. The register arrangement (embedded
// lines written back into the line shift register rather than into a
// separate output bank) is this design's own; the row registers, per-block
// analyzers and per-pixel embedding logic follow the published pipeline.
module wm_pipeline
  import wm_pkg::*;
#(
  parameter int unsigned IMG_W    = 512,
  parameter bit          ENHANCED = 1'b0,
  localparam int unsigned BLK_COLS = IMG_W / BLK,
  localparam int unsigned LINE_W   = IMG_W * PIX_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic                in_blk_start,
  input  logic [LINE_W-1:0]   in_line,
  output logic                wm_req,
  input  logic [BLK_COLS-1:0] wm_bits,
  output logic                out_valid,
  output logic [LINE_W-1:0]   out_line
);
  // index 0 = row1 (newest) ... 2 = row3 (oldest)
  logic [LINE_W-1:0] row      [3];
  logic [2:0]        row_v, row_tag;
  blk_type_e         blk_type [BLK_COLS];
  logic [LINE_W-1:0] emb      [3];
  logic              blk_now;

  assign blk_now = row_v[2] & row_tag[2];
  assign wm_req  = row_v[1] & row_tag[1];

  // Congestion analysis, one analyzer per block column.
  for (genvar c = 0; c < BLK_COLS; c++) begin : g_col
    logic [8:0] msbs;
    logic [3:0] cnt;
    for (genvar r = 0; r < 3; r++) begin : g_r
      for (genvar p = 0; p < 3; p++) begin : g_p
        // block row r is line 3k+r, held in row[2-r]
        assign msbs[3*r+p] = row[2-r][(3*c+p)*PIX_W + MSB_IDX];
      end
    end
    congestion_analyzer u_ca (.msbs(msbs), .count(cnt), .blk_type(blk_type[c]));
  end

  // Embedding, one logic per pixel of the three rows.
  for (genvar r = 0; r < 3; r++) begin : g_row
    for (genvar x = 0; x < IMG_W; x++) begin : g_pix
      if (x < BLK_COLS * BLK) begin : g_emb
        embedding_logic #(.ENHANCED(ENHANCED)) u_el (
          .pix_in  (row[r][x*PIX_W +: PIX_W]),
          .blk_type(blk_type[x / BLK]),
          .wm_bit  (wm_bits[x / BLK]),
          .pix_out (emb[r][x*PIX_W +: PIX_W])
        );
      end else begin : g_pass
        assign emb[r][x*PIX_W +: PIX_W] = row[r][x*PIX_W +: PIX_W];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      row_v     <= '0;
      row_tag   <= '0;
      out_valid <= 1'b0;
    end else begin
      row_v     <= {row_v[1:0], in_valid};
      row_tag   <= {row_tag[1:0], in_valid & in_blk_start};
      out_valid <= row_v[2];
    end
  end

  always_ff @(posedge clk) begin
    row[0] <= in_line;
    if (blk_now) begin
      row[1]   <= emb[0];
      row[2]   <= emb[1];
      out_line <= emb[2];
    end else begin
      row[1]   <= row[0];
      row[2]   <= row[1];
      out_line <= row[2];
    end
  end

  // A block row needs all three of its lines present.
  a_block_complete: assert property (@(posedge clk) disable iff (!rst_n)
    blk_now |-> (row_v[1] && row_v[0]));
endmodule
