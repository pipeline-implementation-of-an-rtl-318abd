// wm_controller: sequences the embedding of one IMG_N x IMG_N image.
//
// A start pulse (accepted only while idle) begins a run. The controller
// then reads one image line per clock from the input RAM, lines 0 to
// IMG_N-1 on consecutive clocks, and tags each line that opens a complete
// 3-line block row. It answers the pipeline's watermark requests with reads
// of consecutive watermark RAM words (one word per block row), and writes
// each line the pipeline returns to the next output RAM address.
//
// Timing: the edge that samples start is edge 0. Line L's read address is
// presented after edge L and the pipeline is six stages deep, so the last
// line is written into the output RAM on edge IMG_N+5: a run takes IMG_N+6
// clock edges. done pulses for one clock after that edge, busy is high from
// edge 0 until it. The pipeline depth and the N+6 figure follow the
// published design; the handshake (start, busy, done) is this design's own.
module wm_controller #(
  parameter int unsigned IMG_N = 512,
  localparam int unsigned BLK_ROWS = IMG_N / 3,
  localparam int unsigned AW  = (IMG_N > 1) ? $clog2(IMG_N) : 1,
  localparam int unsigned WAW = (BLK_ROWS > 1) ? $clog2(BLK_ROWS) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic           busy,
  output logic           done,
  // input image RAM read port
  output logic           img_rd_en,
  output logic [AW-1:0]  img_rd_addr,
  // line tags, aligned with the input RAM's read data
  output logic           line_valid,
  output logic           line_blk_start,
  // watermark RAM read port
  input  logic           wm_req,
  output logic           wm_rd_en,
  output logic [WAW-1:0] wm_rd_addr,
  // output image RAM write port
  input  logic           out_valid,
  output logic           out_wr_en,
  output logic [AW-1:0]  out_wr_addr
);
  typedef enum logic [1:0] {S_IDLE, S_READ, S_DRAIN} state_e;
  state_e     state;
  logic [1:0] phase;   // line index mod 3 of the line being read

  assign busy        = (state != S_IDLE);
  assign img_rd_en   = (state == S_READ);
  assign wm_rd_en    = wm_req;
  assign out_wr_en   = out_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state          <= S_IDLE;
      phase          <= '0;
      img_rd_addr    <= '0;
      wm_rd_addr     <= '0;
      out_wr_addr    <= '0;
      line_valid     <= 1'b0;
      line_blk_start <= 1'b0;
      done           <= 1'b0;
    end else begin
      done           <= 1'b0;
      line_valid     <= img_rd_en;
      line_blk_start <= img_rd_en && (phase == 2'd0) &&
                        (32'(img_rd_addr) + 32'd2 < IMG_N);
      if (wm_req) wm_rd_addr <= wm_rd_addr + 1'b1;
      if (out_valid) begin
        out_wr_addr <= out_wr_addr + 1'b1;
        if (32'(out_wr_addr) == IMG_N - 1) begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
      end
      case (state)
        S_IDLE: if (start) begin
          state       <= S_READ;
          phase       <= '0;
          img_rd_addr <= '0;
          wm_rd_addr  <= '0;
          out_wr_addr <= '0;
        end
        S_READ: begin
          img_rd_addr <= img_rd_addr + 1'b1;
          phase       <= (phase == 2'd2) ? 2'd0 : phase + 2'd1;
          if (32'(img_rd_addr) == IMG_N - 1) state <= S_DRAIN;
        end
        default: ;
      endcase
    end
  end
endmodule
