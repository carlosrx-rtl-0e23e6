// tb_input_fpga: self-checking test of one lateral FPGA.
// Six links on their own clocks (24 to 27 ns) send 40 events each with random
// lengths and gaps; link 4 is disabled. The two external FIFOs are behavioural
// models (64 words) emptied at random by the testbench, so the schedulers
// meet the full flag. The channel buffers are
// reduced to 64 words and event 20 of link 1 is made longer than that, so it
// must arrive truncated. Every word read from the external FIFOs is checked
// against the stream the testbench expects: per event, the enabled links of
// that FIFO in order, each as a fragment header (channel FIRST_CH+c, event
// count, length) followed by the 16-bit words packed in pairs (low half
// first, odd word padded). The truncated fragment must carry the truncated
// flag and an in-order subset of its words. The links start each event
// together, as after one trigger. End-of-event pulses are counted.
module tb_input_fpga;
  import carlosrx_pkg::*;
  localparam int FIRST = 6;
  localparam int NEV   = 40;
  localparam logic [5:0] EN = 6'b101111;

  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;
  logic [5:0] rx_clk = 0;
  for (genvar c = 0; c < 6; c++) begin : g_clk
    always #(12.0 + 0.5 * c) rx_clk[c] = ~rx_clk[c];
  end

  logic [5:0][15:0] rx_data;
  logic [5:0]       rx_valid, rx_last, eoe, chan_afull, in_ovf;
  logic             idle;
  logic [1:0]       ext_wen, ext_ff, ext_ren, ext_ef, ext_hf, ext_paf;
  logic [1:0][31:0] ext_wdata, ext_rdata;
  int               lvl[2], maxl[2];
  int checks = 0, failures = 0, neoe[6], nread = 0, nff = 0;

  // expected words per external FIFO, with a flag for "may be missing"
  logic [31:0] expw[2][$];
  bit          opt[2][$];
  int          lens[6][NEV];
  int          finished[NEV];

  input_fpga #(.FIRST_CH(FIRST), .CH_DEPTH(64)) dut (
    .clk, .rst_n, .rx_clk, .rx_data, .rx_valid, .rx_last, .ch_en(EN), .eoe, .chan_afull,
    .in_ovf, .idle, .ext_wen, .ext_wdata, .ext_ff);

  for (genvar f = 0; f < 2; f++) begin : g_ext
    idt_fifo_model #(.DEPTH(64), .PAF_OFFSET(8)) u_ext (
      .clk, .mrs_n(rst_n), .wen(ext_wen[f]), .wdata(ext_wdata[f]), .ff(ext_ff[f]), .ren(ext_ren[f]),
      .rdata(ext_rdata[f]), .ef(ext_ef[f]), .hf(ext_hf[f]), .paf(ext_paf[f]), .level(lvl[f]),
      .max_level(maxl[f]));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    $display("timeout: left %0d %0d", expw[0].size(), expw[1].size());
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // data of link c, event e, 16-bit word i
  function automatic logic [15:0] w16(int c, int e, int i);
    return 16'((c << 13) ^ (e << 7) ^ i ^ 16'h5A00);
  endfunction

  // expected external streams
  initial begin
    for (int c = 0; c < 6; c++)
      for (int e = 0; e < NEV; e++) lens[c][e] = (c == 1 && e == 20) ? 300 : 1 + $urandom % 50;
    for (int e = 0; e < NEV; e++)
      for (int c = 0; c < 6; c++) if (EN[c]) begin
        int f, n32;
        bit tr;
        f = c / 3; n32 = (lens[c][e] + 1) / 2; tr = (c == 1 && e == 20);
        expw[f].push_back(frag_header(4'(FIRST + c), 4'(e), tr, 16'(n32)));
        opt[f].push_back(0);
        for (int i = 0; i < n32; i++) begin
          logic [15:0] hi;
          hi = (2*i + 1 < lens[c][e]) ? w16(c, e, 2*i + 1) : 16'h0;
          expw[f].push_back({hi, w16(c, e, 2*i)});
          opt[f].push_back(tr);
        end
      end
  end

  // link drivers
  for (genvar c = 0; c < 6; c++) begin : g_link
    initial begin
      rx_valid[c] = 0; rx_last[c] = 0; rx_data[c] = 0;
      wait (rst_n);
      for (int e = 0; e < NEV; e++) begin
        // links start event e together, as after one trigger
        if (e > 0) wait (finished[e - 1] == 6);
        repeat (20 + $urandom % 60) @(negedge rx_clk[c]);
        for (int i = 0; i < lens[c][e]; i++) begin
          while ($urandom % 4 == 0) begin rx_valid[c] = 0; @(negedge rx_clk[c]); end
          rx_valid[c] = 1; rx_data[c] = w16(c, e, i); rx_last[c] = (i == lens[c][e] - 1);
          @(negedge rx_clk[c]);
        end
        rx_valid[c] = 0; rx_last[c] = 0;
        finished[e]++;
      end
    end
  end

  always @(negedge clk) begin
    ext_ren[0] <= ($urandom % 3) == 0;
    ext_ren[1] <= ($urandom % 3) == 0;
  end

  // reader / checker; a fragment header of the truncated event fixes its length
  int trunc_left[2];
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < 6; c++) neoe[c] += eoe[c];
    nff += |(ext_ff);
    for (int f = 0; f < 2; f++) if (ext_ren[f] && !ext_ef[f]) begin
      logic [31:0] w;
      w = ext_rdata[f];
      nread++;
      if (trunc_left[f] > 0) begin
        // skip expected optional words until one matches
        while (opt[f].size() != 0 && opt[f][0] && expw[f][0] != w) begin
          void'(expw[f].pop_front()); void'(opt[f].pop_front());
        end
        check(opt[f].size() != 0 && opt[f][0] && expw[f][0] == w, "truncated fragment word");
        trunc_left[f]--;
        if (expw[f].size() != 0) begin void'(expw[f].pop_front()); void'(opt[f].pop_front()); end
        if (trunc_left[f] == 0)
          while (opt[f].size() != 0 && opt[f][0]) begin void'(expw[f].pop_front()); void'(opt[f].pop_front()); end
      end else if (expw[f].size() != 0 && expw[f][0][27] && expw[f][0][31:28] == FRAG_MARK) begin
        check(w[31:16] == expw[f][0][31:16], "truncated header fields");
        check(w[15:0] < expw[f][0][15:0] && w[15:0] <= 16'd64, "truncated length");
        trunc_left[f] = int'(w[15:0]);
        void'(expw[f].pop_front()); void'(opt[f].pop_front());
        if (trunc_left[f] == 0)
          while (opt[f].size() != 0 && opt[f][0]) begin void'(expw[f].pop_front()); void'(opt[f].pop_front()); end
      end else begin
        check(expw[f].size() != 0 && w == expw[f][0], "external FIFO word");
        if (expw[f].size() != 0 && w != expw[f][0]) $display("  fifo %0d got %h exp %h", f, w, expw[f][0]);
        if (expw[f].size() != 0) begin void'(expw[f].pop_front()); void'(opt[f].pop_front()); end
      end
    end
  end

  initial begin
    trunc_left[0] = 0; trunc_left[1] = 0;
    for (int e = 0; e < NEV; e++) finished[e] = 0;
    for (int c = 0; c < 6; c++) neoe[c] = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    wait (expw[0].size() == 0 && expw[1].size() == 0);
    repeat (20) @(posedge clk);
    for (int c = 0; c < 6; c++) check(neoe[c] == (EN[c] ? NEV : 0), "end-of-event pulses");
    check(nff > 0, "external FIFO full met");
    check(in_ovf == 0, "no input overflow");
    check(idle, "idle at the end");
    $display("words read=%0d, full cycles=%0d", nread, nff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
