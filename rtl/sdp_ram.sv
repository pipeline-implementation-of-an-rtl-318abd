// sdp_ram: simple dual-port RAM, one write port and one read port, both on
// the same clock. Reads are synchronous: rd_data holds mem[rd_addr] one
// clock edge after rd_en is sampled, and keeps its value while rd_en is low.
// A read and a write of the same address on the same edge return the old
// contents. The array is left uninitialised, as a block RAM would be; the
// user loads it before reading. Three of these hold the input image, the
// watermark message and the watermarked image.
module sdp_ram #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
