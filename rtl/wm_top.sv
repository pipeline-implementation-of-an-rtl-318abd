// wm_top: spatial-domain image watermark embedder with bit-plane congestion
// adaptivity, for IMG_N x IMG_N 8-bit grey images.
//
// Three on-chip RAMs hold the input image (one line per word), the
// watermark message (one bit per 3x3 block, one word per block row) and the
// watermarked image. After the host loads the first two and pulses start,
// the controller streams one line per clock through the six-stage pipeline:
// each 3x3 block is classified from its MSB plane as smooth or congested and
// its watermark bit is written into plane 3 or plane 5 of all nine pixels
// (plus the inverted bit into plane 2 or 4 when ENHANCED = 1). A run takes
// IMG_N + 6 clocks; done pulses when the last line is in the output RAM,
// which the host then reads through its own port.
//
// Lines and pixel columns beyond the last whole 3x3 block (IMG_N mod 3 of
// each) are copied unchanged. The host ports, the handshake and the default
// IMG_N = 512 are this design's own choices.
// All ports are synchronous to clk; rst_n is a synchronous active-low reset.
module wm_top
  import wm_pkg::*;
#(
  parameter int unsigned IMG_N    = 512,
  parameter bit          ENHANCED = 1'b0,
  localparam int unsigned BLK_N  = IMG_N / BLK,
  localparam int unsigned LINE_W = IMG_N * PIX_W,
  localparam int unsigned AW     = (IMG_N > 1) ? $clog2(IMG_N) : 1,
  localparam int unsigned WAW    = (BLK_N > 1) ? $clog2(BLK_N) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // host load of the input image, one line per write
  input  logic              img_wr_en,
  input  logic [AW-1:0]     img_wr_addr,
  input  logic [LINE_W-1:0] img_wr_data,
  // host load of the watermark: word k bit j is block (row k, column j)
  input  logic              wm_wr_en,
  input  logic [WAW-1:0]    wm_wr_addr,
  input  logic [BLK_N-1:0]  wm_wr_data,
  // run control
  input  logic              start,
  output logic              busy,
  output logic              done,
  // host read of the watermarked image, data one clock after the request
  input  logic              out_rd_en,
  input  logic [AW-1:0]     out_rd_addr,
  output logic [LINE_W-1:0] out_rd_data
);
  logic              img_rd_en, line_valid, line_blk_start;
  logic [AW-1:0]     img_rd_addr, out_wr_addr;
  logic [LINE_W-1:0] img_rd_data, pipe_out_line;
  logic              wm_req, wm_rd_en, pipe_out_valid, out_wr_en;
  logic [WAW-1:0]    wm_rd_addr;
  logic [BLK_N-1:0]  wm_rd_data;

  sdp_ram #(.WIDTH(LINE_W), .DEPTH(IMG_N)) u_img_ram (
    .clk, .wr_en(img_wr_en), .wr_addr(img_wr_addr), .wr_data(img_wr_data),
    .rd_en(img_rd_en), .rd_addr(img_rd_addr), .rd_data(img_rd_data)
  );

  sdp_ram #(.WIDTH(BLK_N), .DEPTH(BLK_N)) u_wm_ram (
    .clk, .wr_en(wm_wr_en), .wr_addr(wm_wr_addr), .wr_data(wm_wr_data),
    .rd_en(wm_rd_en), .rd_addr(wm_rd_addr), .rd_data(wm_rd_data)
  );

  sdp_ram #(.WIDTH(LINE_W), .DEPTH(IMG_N)) u_out_ram (
    .clk, .wr_en(out_wr_en), .wr_addr(out_wr_addr), .wr_data(pipe_out_line),
    .rd_en(out_rd_en), .rd_addr(out_rd_addr), .rd_data(out_rd_data)
  );

  wm_controller #(.IMG_N(IMG_N)) u_ctrl (
    .clk, .rst_n, .start, .busy, .done,
    .img_rd_en, .img_rd_addr, .line_valid, .line_blk_start,
    .wm_req, .wm_rd_en, .wm_rd_addr,
    .out_valid(pipe_out_valid), .out_wr_en, .out_wr_addr
  );

  wm_pipeline #(.IMG_W(IMG_N), .ENHANCED(ENHANCED)) u_pipe (
    .clk, .rst_n,
    .in_valid(line_valid), .in_blk_start(line_blk_start), .in_line(img_rd_data),
    .wm_req, .wm_bits(wm_rd_data),
    .out_valid(pipe_out_valid), .out_line(pipe_out_line)
  );
endmodule
