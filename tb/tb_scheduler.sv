// tb_scheduler: self-checking test of the round-robin scheduler.
// Three channel buffers and their length queues are modelled by queues in the
// testbench and filled at random times; channel 1 is disabled and also holds
// events, which must never be taken. The external FIFO's full flag toggles
// randomly. The word stream written to the external FIFO is compared with the
// expected one: per trigger, channels 0 and 2 in order, each as header
// (marker, truncated flag, channel number FIRST_CH+c, event count, length)
// followed by its data. No word may be written while full, and while not full
// the scheduler must move one data word per clock.
module tb_scheduler;
  import carlosrx_pkg::*;
  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;

  localparam int FIRST = 3;
  localparam int NEV   = 60;

  logic [2:0]       ch_en = 3'b101;
  logic             ext_ff, ext_wen, idle;
  logic [2:0]       len_empty, dat_empty, len_rd, dat_rd;
  logic [2:0][16:0] len_data;
  logic [2:0][31:0] dat_data;
  logic [31:0]      ext_wdata;
  int checks = 0, failures = 0, nwords = 0, moved_cycles = 0;

  logic [16:0] lq[3][$];
  logic [31:0] dq[3][$];
  logic [31:0] expq[$];

  scheduler #(.N_CH(3), .FIRST_CH(FIRST)) dut (
    .clk, .rst_n, .ch_en, .len_empty, .len_data, .len_rd, .dat_empty, .dat_data, .dat_rd,
    .ext_wen, .ext_wdata, .ext_ff, .idle);

  for (genvar c = 0; c < 3; c++) begin : g_q
    assign len_empty[c] = lq[c].size() == 0;
    assign dat_empty[c] = dq[c].size() == 0;
    assign len_data[c]  = (lq[c].size() != 0) ? lq[c][0] : 17'h0;
    assign dat_data[c]  = (dq[c].size() != 0) ? dq[c][0] : 32'h0;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // expected stream
  int plen[3][NEV];
  bit ptr[3][NEV];
  initial begin
    for (int e = 0; e < NEV; e++)
      for (int c = 0; c < 3; c++) begin
        plen[c][e] = (e % 7 == 3) ? 0 : 1 + ($urandom % 30);
        ptr[c][e]  = ($urandom % 5) == 0;
      end
    for (int e = 0; e < NEV; e++)
      for (int c = 0; c < 3; c += 2) begin
        expq.push_back(frag_header(4'(FIRST + c), 4'(e), ptr[c][e], 16'(plen[c][e])));
        for (int i = 0; i < plen[c][e]; i++) expq.push_back({8'(c), 8'(e), 16'(i)});
      end
  end

  // producers: each channel delivers its events at its own random pace
  for (genvar c = 0; c < 3; c++) begin : g_prod
    initial begin
      wait (rst_n);
      for (int e = 0; e < NEV; e++) begin
        repeat ($urandom % 40) @(negedge clk);
        for (int i = 0; i < plen[c][e]; i++) dq[c].push_back({8'(c), 8'(e), 16'(i)});
        lq[c].push_back({ptr[c][e], 16'(plen[c][e])});
      end
    end
  end

  always @(negedge clk) begin
    ext_ff <= ($urandom % 6) == 0;
  end

  // queue pops are applied just after the edge, once the design has sampled
  always @(posedge clk) if (rst_n) begin
    logic [2:0] pl, pd;
    pl = len_rd; pd = dat_rd;
    #1;
    for (int c = 0; c < 3; c++) begin
      if (pl[c]) begin
        check(c != 1, "disabled channel never served");
        check(lq[c].size() != 0, "length pop on empty");
        if (lq[c].size() != 0) void'(lq[c].pop_front());
      end
      if (pd[c]) begin
        check(dq[c].size() != 0, "data pop on empty");
        if (dq[c].size() != 0) void'(dq[c].pop_front());
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (ext_wen) begin
      check(!ext_ff, "no write while full");
      check(expq.size() != 0 && ext_wdata == expq[0], "stream word");
      if (expq.size() != 0) void'(expq.pop_front());
      nwords++;
    end
    // data phase at full rate: a pending data word with room must move
    if (!ext_ff && expq.size() != 0 && expq[0][31:28] != FRAG_MARK &&
        dq[expq[0][25:24]].size() != 0) begin
      check(ext_wen, "one data word per clock");
      moved_cycles++;
    end
  end

  initial begin
    wait (rst_n);
    wait (expq.size() == 0);
    repeat (10) @(posedge clk);
    check(lq[1].size() == NEV, "disabled channel untouched");
    check(lq[0].size() == 0 && lq[2].size() == 0, "all enabled events taken");
    $display("words=%0d", nwords);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ext_ff = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
  end
endmodule
