// tb_carlosrx_top: end-to-end test of the whole readout at its default sizes
// (4K-word channel buffers, ALICE-like trigger latencies, 115200-baud RS232).
//
// Around the design the testbench places twelve front-end emulators (each
// sends one event on its own link clock after every L2a it receives, words
// derived from link and event number), four external FIFO models (1024
// words, almost full 128 words before full), a TTC source with orbit strobes,
// an LTU that waits for busy to drop, an RS232 terminal and a DAQ sink. The
// sink rebuilds every event and compares it with what the scenario implies:
// CDH fields (bunch crossing and orbit at L0, L1 message, classes, ROI, status
// bits), then for each enabled link its fragment header (link, event count,
// truncated flag, length) and every data word.
// Scenarios, each counted, and a failure counted for any that never happened:
// accepted events; L2 reject; L1 reject; the four erroneous sequences
// (L0error, L1err, L1merr, L2err) giving dummy events; a large event with the
// DAQ link stalled, so the external FIFOs fill, the schedulers wait on their
// full flags, back-pressure rises and busy stays up until the FIFOs drain below half; an
// oversize fragment truncated by its 4K buffer; links disabled by an RS232
// mask command; a local trigger from the RS232 'T' command; an RS232 status
// readout.
module tb_carlosrx_top;
  import carlosrx_pkg::*;
  localparam int CPB = 348;

  logic clk = 0, rst_n = 0;
  always #12.475 clk = ~clk;           // 40.08 MHz
  logic [11:0] rx_clk = 0;
  for (genvar c = 0; c < 12; c++) begin : g_rxclk
    // same frequency as the system clock (the links run on the LHC clock), own phase
    initial begin #(1.9 * c); forever #12.475 rx_clk[c] = ~rx_clk[c]; end
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
    idt_fifo_model #(.DEPTH(1024), .PAF_OFFSET(128)) u_ext (
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

  // ---------------- mechanism counters ----------------
  int n_accept = 0, n_l2r = 0, n_l1rej = 0, n_err[4], n_bp = 0, n_bp_busy = 0, n_ff = 0;
  int n_trunc = 0, n_masked = 0, n_local = 0, n_status = 0, n_busy = 0, n_events_in = 0;

  initial begin
    repeat (3_000_000) @(posedge clk);
    $display("expq=%0d busy=%b bp=%b seq=%b wait=%b", expq.size(), busy, dut.u_main.backpressure, dut.u_main.seq_busy, dut.u_main.wait_data);
    $display("watchdog");
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- front-end emulators ----------------
  int len_override[12][int];
  function automatic int len16(int c, int e);
    if (len_override[c].exists(e)) return len_override[c][e];
    return 1 + ((c * 7919 + e * 104729 + (c ^ e) * 31) % 61);
  endfunction
  function automatic logic [15:0] w16(int c, int e, int i);
    return 16'((c << 12) ^ (e << 6) ^ (i * 3) ^ 16'h0A50);
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
          repeat (10 + c) @(negedge rx_clk[c]);
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

  // ---------------- bunch and orbit reference ----------------
  int bc_m = 0, orbit_m = 0;
  always @(posedge clk) if (rst_n) begin
    if (ttc_bc_rst) begin bc_m = 0; orbit_m++; end
    else bc_m = (bc_m == 3563) ? 0 : bc_m + 1;
  end

  // ---------------- expected events ----------------
  typedef struct {
    bit          dummy;
    logic [3:0]  err;
    logic [11:0] bc;
    logic [23:0] orbit;
    logic [9:0]  msg;
    logic [49:0] classes;
    logic [35:0] roi;
    logic [11:0] mask;
    bit          check_id;
  } exp_t;
  exp_t expq[$];
  logic [11:0] cur_mask = 12'hFFF;
  int frag_cnt[12];

  // ---------------- DAQ sink and checker ----------------
  logic [33:0] evw[$];
  always @(posedge clk) if (rst_n && ddl_valid && ddl_ready) begin
    evw.push_back({ddl_sof, ddl_eof, ddl_data});
    if (ddl_eof) begin
      check_event();
      evw.delete();
    end
  end

  function automatic void check_event();
    exp_t x;
    int p;
    n_events_in++;
    $display("[%0t] event %0d: %0d words, status %h", $time, n_events_in, evw.size(), evw.size() > 4 ? evw[4][27:12] : 0);
    check(expq.size() != 0, "an event was expected");
    if (expq.size() == 0) return;
    x = expq.pop_front();
    check(evw.size() >= 8 && evw[0][33], "CDH present");
    if (evw.size() < 8) return;
    check(evw[0][31:0] == 32'hFFFF_FFFF, "CDH block length");
    check(evw[1][31:24] == 8'h02 && evw[1][23:14] == x.msg && evw[1][13:12] == 0, "CDH version/L1 message");
    if (x.check_id) check(evw[1][11:0] == x.bc && evw[2][23:0] == x.orbit, "CDH event ID");
    check(evw[3][31:0] == 32'h0000_0002, "CDH sub-detectors");
    check(evw[4][27:12] == {11'd0, x.dummy, x.err}, "CDH status and errors");
    check(evw[5][31:0] == x.classes[31:0] && evw[6][17:0] == x.classes[49:32], "CDH classes");
    check(evw[6][31:28] == x.roi[3:0] && evw[7][31:0] == x.roi[35:4] && evw[6][27:18] == 0, "CDH ROI");
    p = 8;
    if (!x.dummy) begin
      for (int c = 0; c < 12; c++) if (x.mask[c]) begin
        int e, n16, n32;
        bit tr;
        logic [31:0] h;
        e = frag_cnt[c]; frag_cnt[c]++;
        n16 = len16(c, e); n32 = (n16 + 1) / 2; tr = n32 > 4096;
        check(p < evw.size(), "fragment present");
        if (p >= evw.size()) return;
        h = evw[p][31:0]; p++;
        check(h[31:28] == 4'hA && h[23:20] == 4'(c) && h[19:16] == 4'(e) && h[27] == tr, "fragment header");
        if (tr) begin
          n_trunc++;
          check(h[15:0] <= 16'd4096 && h[15:0] >= 16'd4000, "truncated length");
          // kept words are the first ones plus possibly some later: check the first 4000
          for (int i = 0; i < 4000 && p + i < evw.size(); i++)
            check(evw[p + i][31:0] == {((2*i+1 < n16) ? w16(c, e, 2*i+1) : 16'h0), w16(c, e, 2*i)}, "truncated data");
          p += int'(h[15:0]);
        end else begin
          check(h[15:0] == 16'(n32), "fragment length");
          for (int i = 0; i < n32; i++) begin
            logic [31:0] w;
            w = {((2*i+1 < n16) ? w16(c, e, 2*i+1) : 16'h0), w16(c, e, 2*i)};
            if (p < evw.size()) check(evw[p][31:0] == w, "fragment data");
            p++;
          end
        end
      end
    end
    check(p == evw.size() && evw[evw.size()-1][32], "event ends after the last fragment");
  endfunction

  // ---------------- monitors ----------------
  logic bp_q = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_main.backpressure && !bp_q) n_bp++;
    bp_q = dut.u_main.backpressure;
    if (dut.u_main.backpressure && busy) n_bp_busy++;
    n_ff += |ext_ff;
    n_busy += busy;
  end

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

  // ---------------- TTC / LTU ----------------
  task automatic wait_ready();
    while (busy) tick();
    tick(20);
  endtask

  task automatic l0_now(output logic [11:0] bc, output logic [23:0] orb);
    ttc_l0 = 1; bc = 12'(bc_m); orb = 24'(orbit_m); tick(); ttc_l0 = 0;
  endtask

  task automatic accepted_event(input logic [9:0] msg, input logic [49:0] cl, input logic [35:0] roi);
    exp_t x;
    wait_ready();
    l0_now(x.bc, x.orbit);
    tick(214); ttc_l1 = 1; tick(); ttc_l1 = 0;
    tick(12); ttc_l1m_data = msg; ttc_l1m_valid = 1; tick(); ttc_l1m_valid = 0;
    tick(40); ttc_l2_classes = cl; ttc_l2_roi = roi; ttc_l2a = 1; tick(); ttc_l2a = 0;
    x.dummy = 0; x.err = 0; x.msg = msg; x.classes = cl; x.roi = roi; x.mask = cur_mask; x.check_id = 1;
    expq.push_back(x);
    n_accept++;
  endtask

  task automatic dummy_expected(input logic [3:0] err, input logic [11:0] bc, input logic [23:0] orb,
                                input logic [9:0] msg, input bit id);
    exp_t x;
    x.dummy = 1; x.err = err; x.bc = bc; x.orbit = orb; x.msg = msg; x.classes = 0; x.roi = 0;
    x.mask = 0; x.check_id = id;
    expq.push_back(x);
  endtask

  initial begin
    exp_t x;
    logic [11:0] bc;
    logic [23:0] orb;
    for (int i = 0; i < 4; i++) n_err[i] = 0;
    for (int c = 0; c < 12; c++) begin l2a_cnt[c] = 0; sent_cnt[c] = 0; frag_cnt[c] = 0; end
    tick(4); rst_n = 1; tick(10);
    fork forever begin tick(3563); ttc_bc_rst = 1; tick(); ttc_bc_rst = 0; end join_none

    // accepted events
    for (int k = 0; k < 6; k++)
      accepted_event(10'(k * 37 + 1), {18'(k), 32'hC0FF_EE00 + 32'(k)}, {4'(k), 32'h1234_0000 + 32'(k)});

    // L2 reject
    wait_ready();
    l0_now(bc, orb); tick(214); ttc_l1 = 1; tick(); ttc_l1 = 0;
    tick(12); ttc_l1m_valid = 1; tick(); ttc_l1m_valid = 0; tick(30); ttc_l2r = 1; tick(); ttc_l2r = 0;
    n_l2r++;
    // L1 reject
    wait_ready(); l0_now(bc, orb); tick(300); n_l1rej++;
    check(!busy, "busy released after L1 reject");

    // erroneous sequences
    wait_ready(); l0_now(bc, orb); tick(5);
    dummy_expected(4'b0001, bc, orb, 0, 1); n_err[0]++;
    ttc_l0 = 1; tick(); ttc_l0 = 0;
    wait_ready();
    dummy_expected(4'b0010, 0, 0, 0, 0); n_err[1]++;
    ttc_l1 = 1; tick(); ttc_l1 = 0;
    wait_ready(); l0_now(bc, orb); tick(214); ttc_l1 = 1; tick(); ttc_l1 = 0;
    dummy_expected(4'b0100, bc, orb, 0, 1); n_err[2]++; tick(150);
    wait_ready(); l0_now(bc, orb); tick(214); ttc_l1 = 1; tick(); ttc_l1 = 0;
    tick(12); ttc_l1m_data = 10'h2F0; ttc_l1m_valid = 1; tick(); ttc_l1m_valid = 0;
    dummy_expected(4'b1000, bc, orb, 10'h2F0, 1); n_err[3]++; tick(4600);

    // large event with the DAQ link stalled: external FIFOs fill up
    wait_ready();
    ddl_ready = 0;
    for (int c = 0; c < 12; c++) len_override[c][6] = 900;
    accepted_event(10'h111, 50'h5, 36'h6);
    while (!dut.u_main.backpressure) tick();
    tick(2000);
    check(busy, "busy during back-pressure");
    ddl_ready = 1;
    wait_ready();
    check(!dut.u_main.backpressure, "back-pressure released");

    // oversize fragment: link 5 sends more than 4K 32-bit words
    len_override[5][7] = 8400;
    accepted_event(10'h222, 50'h7, 36'h8);

    // disable links 2 and 7 through RS232
    wait_ready();
    send(8'h45); send(8'h0F); send(8'h7B);
    tick(100);
    check(xcvr_disable == 12'h084, "transceivers 2 and 7 disabled");
    cur_mask = 12'hF7B;
    accepted_event(10'h333, 50'h9, 36'hA); n_masked++;
    accepted_event(10'h334, 50'hB, 36'hC); n_masked++;

    // local trigger through RS232
    wait_ready();
    x.dummy = 0; x.err = 0; x.msg = 0; x.classes = 0; x.roi = 0; x.mask = cur_mask; x.check_id = 0;
    expq.push_back(x);
    send(8'h54); n_local++;

    // status readout
    wait_ready();
    tick(500);
    rxb.delete();
    send(8'h53);
    tick(9 * 10 * CPB);
    check(rxb.size() == 8, "status reply");
    if (rxb.size() == 8) begin
      check({rxb[0], rxb[1][7:4]} == 12'hF7B, "status: channel mask");
      check(rxb[6][7] == 1'b0 && rxb[6][5] == 1'b0, "status: not busy, no fragment error");
      check({rxb[6][3:0], rxb[7]} == 12'(n_events_in), "status: events sent");
      n_status++;
    end

    tick(1000);
    check(expq.size() == 0, "every expected event arrived");
    check(n_accept > 0 && n_l2r > 0 && n_l1rej > 0, "accept, L2 reject and L1 reject happened");
    for (int i = 0; i < 4; i++) check(n_err[i] > 0, "each erroneous sequence happened");
    check(n_bp > 0 && n_bp_busy > 0 && n_ff > 0, "back-pressure, busy from it and external FIFO full happened");
    check(n_trunc > 0, "truncation happened");
    check(n_masked > 0 && n_local > 0 && n_status > 0 && n_busy > 0, "mask, local trigger, status, busy happened");
    for (int i = 0; i < 4; i++) check(maxl[i] <= 1024, "external FIFO never overfilled");
    $display("events=%0d accepted=%0d l2r=%0d l1rej=%0d err=%0d/%0d/%0d/%0d bp=%0d bp_busy=%0d ff=%0d trunc=%0d masked=%0d local=%0d status=%0d",
             n_events_in, n_accept, n_l2r, n_l1rej, n_err[0], n_err[1], n_err[2], n_err[3], n_bp, n_bp_busy,
             n_ff, n_trunc, n_masked, n_local, n_status);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
