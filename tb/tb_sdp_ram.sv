// tb_sdp_ram: writes random words, reads them back and checks the one-clock
// read latency, that rd_data holds while rd_en is low, and read-before-write
// on a same-address collision.
module tb_sdp_ram;
  localparam int W = 24, D = 16;
  logic clk = 0, wr_en = 0, rd_en = 0;
  logic [3:0] wr_addr = '0, rd_addr = '0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [W-1:0] model [D];
  int checks = 0, failures = 0;

  sdp_ram #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [W-1:0] exp, string what);
    checks++;
    if (rd_data !== exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, rd_data, exp);
    end
  endtask

  initial begin
    for (int a = 0; a < D; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 4'(a); wr_data = W'($urandom); model[a] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int a = D - 1; a >= 0; a--) begin
      rd_en = 1; rd_addr = 4'(a);
      @(negedge clk);
      check(model[a], "readback");
    end
    // hold while rd_en is low
    rd_en = 0; rd_addr = 4'd3;
    @(negedge clk); @(negedge clk);
    check(model[0], "hold");
    // collision: old data returned, new data next time
    rd_en = 1; rd_addr = 4'd5; wr_en = 1; wr_addr = 4'd5; wr_data = ~model[5];
    @(negedge clk);
    check(model[5], "read-before-write");
    model[5] = ~model[5];
    wr_en = 0;
    @(negedge clk);
    check(model[5], "after write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
