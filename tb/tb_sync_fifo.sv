// tb_sync_fifo: self-checking test of the synchronous FWFT FIFO.
// Random pushes and pops against a queue model; checks data order, empty,
// full, count and almost_full, including writes while full and reads while
// empty. A small depth (16) keeps full and almost-full reachable; a second
// instance at the default 4K depth is filled once to check its size.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        wr_en, rd_en, full, empty, af;
  logic [31:0] wr_data, rd_data;
  logic [4:0]  count;
  int checks = 0, failures = 0;
  logic [31:0] model[$];

  sync_fifo #(.WIDTH(32), .DEPTH(16), .AF_LEVEL(12)) dut (
    .clk, .rst_n, .wr_en, .wr_data, .full, .rd_en, .rd_data, .empty, .count, .almost_full(af));

  // default-size instance
  logic        b_wr, b_full, b_empty, b_af;
  logic [31:0] b_rd;
  logic [12:0] b_count;
  sync_fifo big (.clk, .rst_n, .wr_en(b_wr), .wr_data(32'hC0DE0000), .full(b_full), .rd_en(1'b0),
                 .rd_data(b_rd), .empty(b_empty), .count(b_count), .almost_full(b_af));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    wr_en = 0; rd_en = 0; wr_data = 0; b_wr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      // phase-dependent bias so the FIFO fills and drains
      wr_en   = ($urandom % 100) < ((((i / 300) % 2) != 0) ? 80 : 25);
      rd_en   = ($urandom % 100) < ((((i / 300) % 2) != 0) ? 25 : 80);
      wr_data = $urandom;
      check(count == 5'(model.size()), "count");
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == 16), "full");
      check(af == (model.size() >= 12), "almost_full");
      if (model.size() != 0) check(rd_data == model[0], "rd_data");
      begin
        bit do_rd, do_wr;
        do_rd = rd_en && model.size() != 0;
        do_wr = wr_en && model.size() < 16;
        @(posedge clk);
        if (do_rd) void'(model.pop_front());
        if (do_wr) model.push_back(wr_data);
      end
    end
    // fill the 4K instance
    @(negedge clk); b_wr = 1;
    repeat (4100) @(negedge clk);
    b_wr = 0;
    check(b_count == 13'd4096, "4K fill level");
    check(b_full && b_af && !b_empty, "4K flags");
    check(b_rd == 32'hC0DE0000, "4K data");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
