// tb_carlosrx_rate: throughput and trigger-rate test of the whole readout at
// its default sizes, with all twelve links enabled.
//
// Phase 1, saturated random triggers: an LTU-like generator tries to start an
// accepted sequence (L0, L1 210 clocks later, the L1 message, L2a) at random
// clocks (probability 1/8 per clock) whenever busy is low. Each link answers
// every L2a with an event of 1000 to 2048 link words (at most 1024 32-bit
// words: with busy raised at 3/4 of a 4K buffer, the largest event that can
// never be truncated however closely triggers follow). The input side then
// delivers far more than one 32-bit word per clock can carry away, the
// buffers fill, busy holds the triggers back, and the DAQ output becomes the
// bottleneck. The test checks every event word by word, and that from
// the first to the last word the DAQ link carried at least 0.97 words per
// clock (32 bits x 40.08 MHz = 160.3 MB/s at full occupancy). Meanwhile the
// RS232 spy mode is switched on: every 32-bit word it returns must be one
// that was sent to the DAQ. Then spy mode is switched off again and the port
// must fall silent.
//
// Phase 2, a low fixed rate: three triggers 421 895 clocks apart (95 Hz at
// 40.08 MHz). Each event (twelve links of 3000 link words) must leave before
// the next trigger. Busy must fall within a few thousand clocks of L0. Once
// busy has fallen the whole event is on the board, and the rest of it must
// leave at one word per clock, give or take a few clocks.
//
// The external FIFO models have 16K words (the size of common IDT parts of
// that family) and raise almost-full 1024 words before full.
module tb_carlosrx_rate;
  import carlosrx_pkg::*;
  localparam int CPB = 348;
  localparam longint PERIOD_95HZ = 421_895;

  logic clk = 0, rst_n = 0;
  always #12.475 clk = ~clk;           // 40.08 MHz
  logic [11:0] rx_clk = 0;
  for (genvar c = 0; c < 12; c++) begin : g_rxclk
    initial begin #(2.1 * c); forever #12.475 rx_clk[c] = ~rx_clk[c]; end
  end

  logic [11:0][15:0] rx_data;
  logic [11:0]       rx_valid, rx_last;
  logic              ext_rst_n;
  logic [3:0]        ext_wen, ext_ff, ext_ren, ext_ef, ext_hf, ext_paf;
  logic [3:0][31:0]  ext_wdata, ext_rdata;
  logic              ttc_bc_rst = 0, ttc_l0 = 0, ttc_l1 = 0, ttc_l1m_valid = 0, ttc_l2a = 0, ttc_l2r = 0;
  logic [9:0]        ttc_l1m_data = 0;
  logic [49:0]       ttc_l2_classes = 0;
  logic [35:0]       ttc_l2_roi = 0;
  logic              busy;
  logic [11:0]       fee_l0, fee_l1, fee_l2a, fee_l2r, xcvr_disable;
  logic [31:0]       ddl_data;
  logic              ddl_valid, ddl_sof, ddl_eof, ddl_ready = 1;
  logic              uart_rx = 1, uart_tx;
  int                lvl[4], maxl[4];

  carlosrx_top dut (
    .clk, .rst_n, .rx_clk, .rx_data, .rx_valid, .rx_last,
    .ext_rst_n, .ext_wen, .ext_wdata, .ext_ff, .ext_ren, .ext_rdata, .ext_ef, .ext_hf, .ext_paf,
    .ttc_bc_rst, .ttc_l0, .ttc_l1, .ttc_l1m_valid, .ttc_l1m_data, .ttc_l2a, .ttc_l2r,
    .ttc_l2_classes, .ttc_l2_roi, .busy, .fee_l0, .fee_l1, .fee_l2a, .fee_l2r,
    .ddl_data, .ddl_valid, .ddl_sof, .ddl_eof, .ddl_ready, .xcvr_disable, .uart_rx, .uart_tx);

  for (genvar f = 0; f < 4; f++) begin : g_ext
    idt_fifo_model #(.DEPTH(16384), .PAF_OFFSET(1024)) u_ext (
      .clk, .mrs_n(ext_rst_n), .wen(ext_wen[f]), .wdata(ext_wdata[f]), .ff(ext_ff[f]),
      .ren(ext_ren[f]), .rdata(ext_rdata[f]), .ef(ext_ef[f]), .hf(ext_hf[f]), .paf(ext_paf[f]),
      .level(lvl[f]), .max_level(maxl[f]));
  end

  int checks = 0, failures = 0;
  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endfunction
  task automatic tick(input int n = 1);
    repeat (n) @(negedge clk);
  endtask

  initial begin
    repeat (4_000_000) @(posedge clk);
    $display("watchdog");
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- front-end emulators ----------------
  bit slow_phase = 0;
  function automatic int len16(int c, int e);
    if (slow_phase) return 3000;
    return 1000 + ((c * 331 + e * 977 + c * e * 13) % 1049);
  endfunction
  function automatic logic [15:0] w16(int c, int e, int i);
    return 16'((c << 12) ^ (e << 5) ^ (i * 5) ^ 16'h3C69);
  endfunction

  int l2a_cnt[12], sent_cnt[12];
  always @(posedge clk) for (int c = 0; c < 12; c++) if (fee_l2a[c]) l2a_cnt[c]++;

  for (genvar c = 0; c < 12; c++) begin : g_fee
    initial begin
      rx_valid[c] = 0; rx_last[c] = 0; rx_data[c] = 0;
      forever begin
        @(negedge rx_clk[c]);
        if (l2a_cnt[c] > sent_cnt[c]) begin
          int e, n;
          e = sent_cnt[c]; n = len16(c, e);
          repeat (4 + c) @(negedge rx_clk[c]);
          for (int i = 0; i < n; i++) begin
            rx_valid[c] = 1; rx_data[c] = w16(c, e, i); rx_last[c] = (i == n - 1);
            @(negedge rx_clk[c]);
          end
          rx_valid[c] = 0; rx_last[c] = 0;
          sent_cnt[c]++;
        end
      end
    end
  end

  // ---------------- expected events and DAQ sink ----------------
  typedef struct {
    logic [9:0]  msg;
    logic [49:0] classes;
    logic [35:0] roi;
  } exp_t;
  exp_t expq[$];
  int   frag_cnt[12];
  int   n_events = 0;
  longint n_words = 0;
  longint t_first = -1, t_last = 0, cyc = 0;
  bit   seen[logic [31:0]];            // every word sent to the DAQ, for the spy check

  always @(posedge clk) cyc <= cyc + 1;

  logic [33:0] evw[$];
  always @(posedge clk) if (rst_n && ddl_valid && ddl_ready) begin
    evw.push_back({ddl_sof, ddl_eof, ddl_data});
    n_words++;
    if (ddl_sof && t_first < 0) t_first = cyc;
    seen[ddl_data] = 1'b1;
    if (ddl_eof) begin
      t_last = cyc;
      check_event();
      evw.delete();
    end
  end

  function automatic void check_event();
    exp_t x;
    int p;
    n_events++;
    check(expq.size() != 0, "an event was expected");
    if (expq.size() == 0) return;
    x = expq.pop_front();
    check(evw.size() >= 8 && evw[0][33], "CDH present");
    if (evw.size() < 8) return;
    check(evw[1][23:14] == x.msg, "CDH L1 message");
    check(evw[4][27:12] == 16'd0, "CDH status clean");
    check(evw[5][31:0] == x.classes[31:0] && evw[6][17:0] == x.classes[49:32], "CDH classes");
    check(evw[6][31:28] == x.roi[3:0] && evw[7][31:0] == x.roi[35:4], "CDH ROI");
    p = 8;
    for (int c = 0; c < 12; c++) begin
      int e, n16, n32, bad;
      logic [31:0] h;
      e = frag_cnt[c]; frag_cnt[c]++;
      n16 = len16(c, e); n32 = (n16 + 1) / 2;
      check(p < evw.size(), "fragment present");
      if (p >= evw.size()) return;
      h = evw[p][31:0]; p++;
      check(h == frag_header(4'(c), 4'(e), 1'b0, 16'(n32)), "fragment header");
      bad = 0;
      for (int i = 0; i < n32; i++) begin
        logic [31:0] w;
        w = {((2*i+1 < n16) ? w16(c, e, 2*i+1) : 16'h0), w16(c, e, 2*i)};
        if (p >= evw.size() || evw[p][31:0] != w) bad++;
        p++;
      end
      check(bad == 0, "fragment data");
    end
    check(p == evw.size() && evw[evw.size()-1][32], "event ends after the last fragment");
  endfunction

  // ---------------- RS232 terminal ----------------
  logic [7:0] rxb[$];
  task automatic send(input logic [7:0] b);
    logic [9:0] f;
    f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin uart_rx = f[i]; repeat (CPB) @(negedge clk); end
  endtask
  initial begin
    wait (rst_n); repeat (5) @(posedge clk);
    forever begin
      logic [7:0] b;
      @(negedge uart_tx);
      repeat (CPB / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge clk); b[i] = uart_tx; end
      repeat (CPB) @(posedge clk);
      rxb.push_back(b);
    end
  end

  // ---------------- LTU / trigger source ----------------
  int n_seq = 0;
  task automatic accepted_sequence();
    exp_t x;
    x.msg = 10'($urandom); x.classes = {18'($urandom), 32'($urandom)}; x.roi = {4'($urandom), 32'($urandom)};
    expq.push_back(x);
    ttc_l0 = 1; tick(); ttc_l0 = 0;
    tick(209);
    ttc_l1 = 1; tick(); ttc_l1 = 0;
    ttc_l1m_valid = 1; ttc_l1m_data = x.msg; tick(); ttc_l1m_valid = 0;
    tick(18);
    ttc_l2a = 1; ttc_l2_classes = x.classes; ttc_l2_roi = x.roi; tick(); ttc_l2a = 0;
    n_seq++;
  endtask

  // orbit strobe every 3564 clocks
  initial begin
    wait (rst_n);
    forever begin tick(3563); ttc_bc_rst = 1; tick(); ttc_bc_rst = 0; end
  end

  int n_bp = 0, n_afull = 0;
  logic bp_q = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_main.backpressure && !bp_q) n_bp++;
    bp_q = dut.u_main.backpressure;
    if (|dut.u_main.chan_afull) n_afull++;
  end

  localparam int N_FAST = 48;

  initial begin
    longint t0, t_busy_end, t_ev_last, words0, words_busy;
    int spied, spy_bad;
    logic [31:0] sw;
    tick(10); rst_n = 1; tick(20);

    // ---- phase 1: random triggers offered every clock, busy obeyed ----
    fork
      begin
        send(8'h50);                      // spy on
      end
      begin
        while (n_seq < N_FAST) begin
          if (!busy && ($urandom % 8) == 0) accepted_sequence();
          else tick();
        end
      end
    join
    while (n_events < N_FAST) tick();
    send(8'h50);                          // spy off
    tick(6 * 10 * CPB);                   // let a word in flight finish
    begin
      real rate;
      rate = real'(n_words) / real'(t_last - t_first + 1);
      $display("phase 1: %0d events, %0d words in %0d clocks: %f words/clock, back-pressure %0d times, busy from full buffers %0d clocks",
               n_events, n_words, t_last - t_first + 1, rate, n_bp, n_afull);
      check(rate >= 0.97, "DAQ link saturated at one word per clock");
    end
    // spy words: groups of four bytes, MSB first, each a word sent to the DAQ
    spied = 0; spy_bad = 0;
    while (rxb.size() >= 4) begin
      bit found;
      sw = {rxb[0], rxb[1], rxb[2], rxb[3]};
      repeat (4) void'(rxb.pop_front());
      found = seen.exists(sw);
      spied++;
      if (!found) spy_bad++;
    end
    check(rxb.size() == 0, "spy replies are whole words");
    check(spied >= 10, "spy mode returned words");
    check(spy_bad == 0, "every spied word was sent to the DAQ");
    $display("spy: %0d words", spied);
    rxb.delete();
    tick(20 * 10 * CPB);
    check(rxb.size() == 0, "spy mode off");

    // ---- phase 2: 95 Hz ----
    slow_phase = 1;
    for (int k = 0; k < 3; k++) begin
      check(!busy, "not busy when the next 95 Hz trigger comes");
      t0 = cyc;
      words0 = n_words;
      fork
        accepted_sequence();
      join_none
      tick(2);
      while (busy) tick();
      t_busy_end = cyc;
      words_busy = n_words;
      while (n_events < N_FAST + k + 1) tick();
      t_ev_last = cyc;
      $display("95 Hz event %0d: busy %0d clocks, %0d words, last %0d of them in %0d clocks", k,
               t_busy_end - t0, n_words - words0, n_words - words_busy, t_ev_last - t_busy_end);
      check(t_busy_end - t0 < 4000, "busy ends shortly after the front end delivered");
      check(t_ev_last - t_busy_end <= longint'(n_words - words_busy) + 40, "event read out at one word per clock");
      check(t_ev_last - t0 < PERIOD_95HZ, "event leaves before the next 95 Hz trigger");
      while (cyc - t0 < PERIOD_95HZ) tick();
    end

    for (int i = 0; i < 4; i++) check(maxl[i] <= 16384, "external FIFO never overfilled");
    check(expq.size() == 0, "every event arrived");
    check(!dut.u_main.frag_err, "no fragment error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
