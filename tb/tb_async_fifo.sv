// tb_async_fifo: self-checking test of the dual-clock input FIFO.
// Writer on a 37 ns clock, reader on the 25 ns system clock. Random writes and
// reads are checked for order and completeness against a queue model; a burst
// with the reader stopped checks full and the sticky overflow flag.
module tb_async_fifo;
  logic wclk = 0, rclk = 0, rst_n = 0;
  always #18.5 wclk = ~wclk;
  always #12.5 rclk = ~rclk;

  logic        wr_en = 0, rd_en = 0, full, ovf, empty;
  logic [16:0] wr_data = 0, rd_data;
  int checks = 0, failures = 0, nwritten = 0, nread = 0;
  logic [16:0] model[$];
  bit stop_reader = 0;

  async_fifo #(.WIDTH(17), .DEPTH(16)) dut (
    .wclk, .wrst_n(rst_n), .wr_en, .wr_data, .full, .overflow(ovf),
    .rclk, .rrst_n(rst_n), .rd_en, .rd_data, .empty);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge rclk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // writer
  initial begin
    repeat (3) @(posedge wclk);
    rst_n = 1;
    repeat (3) @(posedge wclk);
    for (int i = 0; i < 2000; i++) begin
      @(negedge wclk);
      wr_en   = ($urandom % 3) != 0 && !full;
      wr_data = 17'($urandom);
      @(posedge wclk);
      if (wr_en) begin model.push_back(wr_data); nwritten++; end
    end
    @(negedge wclk); wr_en = 0;
    check(ovf == 0, "no overflow while writer respects full");
    // wait until drained, then overflow with the reader stopped
    wait (model.size() == 0);
    repeat (6) @(posedge rclk);
    stop_reader = 1;
    repeat (4) @(posedge wclk);
    for (int i = 0; i < 20; i++) begin
      @(negedge wclk); wr_en = 1; wr_data = 17'(i);
      @(posedge wclk); if (i < 16) check(!full || i >= 16, "accepts 16 words");
      if (i < 16) model.push_back(wr_data);
    end
    @(negedge wclk); wr_en = 0;
    check(full, "full after 16 words");
    check(ovf, "overflow flag after writes while full");
    stop_reader = 0;
    wait (model.size() == 0);
    repeat (10) @(posedge rclk);
    check(empty, "empty at end");
    check(nread == nwritten + 16, "all words read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reader
  always @(negedge rclk) begin
    rd_en <= !stop_reader && ($urandom % 4) != 0;
  end
  always @(posedge rclk) begin
    if (rst_n && rd_en && !empty) begin
      check(model.size() != 0 && rd_data == model[0], "read order");
      if (model.size() != 0) void'(model.pop_front());
      nread++;
    end
  end
endmodule
